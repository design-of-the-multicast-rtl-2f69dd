// mc_msg_proc: the tree-maintenance rules of one port, applied to one control
// message and the tree memory entry of the session it addresses.
//
// Purely combinational.  The caller resolves the local SID first (the newly
// allocated SID for type 1, the lookup result for type 4, the message's
// destination SID otherwise), reads that entry and presents it here.  The block
// returns the rewritten entry, the lookup-memory update, whether a SID is taken
// or given back, and up to three outgoing messages.
//
// Rules that follow the document:
//   type 2 walks from the root towards the smaller branch fanout (left on a
//     tie), adding 1 to every fanout on its path; the first port whose chosen
//     branch fanout is 0 adopts the new port as that child.
//   type 3 walks towards the larger fanout (right on a tie), subtracting 1; the
//     first childless port is the replacement and sends type 4 (carrying the
//     RSID) to the leaving port.
//   type 4 makes the leaving port look its SID up, send its two children (two
//     type 5) and its parent (type 6) to the replacement and free the entry.
//   type 5 / 6 / 7 rewrite a child, the parent, or the child of a parent.
//   A port that has received the parent of the leaving port (the last of the
//     three messages) announces itself: type 6 to its new children, type 7 to
//     its new parent.
// Choices of this design where the document is silent:
//   a child is present exactly when its branch fanout is non-zero, so a type 3
//     that brings a fanout to 0 also detaches the replacement from its parent;
//   the port that adopts a new port tells it its parent with a type 6;
//   a type 1 whose RSID names the receiving port itself creates the root entry;
//   if the deepest port is the leaving port itself it only frees its entry;
//   the information field carries: type 3 the leaving port ID; type 4 the root
//     ID of the RSID (its SID rides in the destination SID); type 5 {side,
//     fanout} with side 1 = right; type 6 {transfer flag, leaving port index};
//     type 7 the ID of the child being replaced.
module mc_msg_proc #(
  parameter int N  = 8,
  parameter int NS = 40
) (
  input  logic [mc_pkg::idx_w(N)-1:0]          own_idx,   // this port, 0..N-1
  input  logic [mc_pkg::msg_len(N, NS)-1:0]    msg_in,
  input  logic [mc_pkg::sid_w(NS)-1:0]         sid,       // resolved local SID
  input  logic [mc_pkg::entry_w(N, NS)-1:0]    entry_in,  // entry at sid
  output logic                                 entry_we,
  output logic [mc_pkg::entry_w(N, NS)-1:0]    entry_out,
  output logic                                 alloc,     // sid is taken
  output logic                                 release_sid, // sid is freed
  output logic                                 lk_we,
  output logic                                 lk_set,    // 1 = insert, 0 = clear
  output logic [mc_pkg::idx_w(N)+mc_pkg::sid_w(NS)-1:0] lk_key, // {root idx, root SID}
  output logic [2:0]                           out_valid,
  output logic [2:0][mc_pkg::msg_len(N, NS)-1:0] out_msg
);
  import mc_pkg::*;
  `include "mc_types.svh"

  mc_msg_t   m;
  mc_entry_t e, en;
  mc_msg_t   o [3];
  logic [ID_W-1:0] own_id;
  logic            go_left;

  assign m      = mc_msg_t'(msg_in);
  assign e      = mc_entry_t'(entry_in);
  assign own_id = ID_W'(own_idx) + 1'b1;

  always_comb begin
    en          = e;
    entry_we    = 1'b0;
    alloc       = 1'b0;
    release_sid = 1'b0;
    lk_we       = 1'b0;
    lk_set      = 1'b0;
    lk_key      = '0;
    go_left     = 1'b0;
    for (int k = 0; k < 3; k++) o[k] = '0;
    out_valid   = '0;

    unique case (m.mtype)
      MT_ALLOC: begin
        alloc    = 1'b1;
        entry_we = 1'b1;
        en       = '0;
        lk_we    = 1'b1;
        lk_set   = 1'b1;
        if (m.src_id == own_id) begin
          // root of a new tree: its RSID is (own ID, allocated SID)
          lk_key     = {own_idx, sid};
          en.par_idx = own_idx;
          en.par_sid = sid;
        end else begin
          lk_key       = {IDX_W'(m.src_id - 1'b1), m.src_sid};
          out_valid[0] = 1'b1;
          o[0].mtype   = MT_ADD;
          o[0].dst_sid = m.src_sid;
          o[0].dst_id  = m.src_id;
          o[0].src_sid = sid;
          o[0].src_id  = own_id;
        end
      end

      MT_ADD: begin
        entry_we     = 1'b1;
        go_left      = (e.f_left <= e.f_right);
        out_valid[0] = 1'b1;
        if (go_left) begin
          en.f_left = e.f_left + 1'b1;
          if (e.f_left == '0) begin
            en.left_sid = m.src_sid;
            en.left_idx = IDX_W'(m.src_id - 1'b1);
          end
        end else begin
          en.f_right = e.f_right + 1'b1;
          if (e.f_right == '0) begin
            en.right_sid = m.src_sid;
            en.right_idx = IDX_W'(m.src_id - 1'b1);
          end
        end
        if ((go_left ? e.f_left : e.f_right) == '0) begin
          // adopt the new port and tell it its parent
          o[0].mtype   = MT_CHG_PARENT;
          o[0].dst_sid = m.src_sid;
          o[0].dst_id  = m.src_id;
          o[0].src_sid = sid;
          o[0].src_id  = own_id;
        end else begin
          o[0]         = m;
          o[0].dst_sid = go_left ? e.left_sid : e.right_sid;
          o[0].dst_id  = ID_W'(go_left ? e.left_idx : e.right_idx) + 1'b1;
        end
      end

      MT_FIND_REPL: begin
        if (e.f_left == '0 && e.f_right == '0) begin
          if (m.info == own_id) begin
            // the deepest port is the leaving port itself
            release_sid = 1'b1;
            entry_we    = 1'b1;
            en          = '0;
            lk_we       = 1'b1;
            lk_key      = {IDX_W'(m.src_id - 1'b1), m.src_sid};
          end else begin
            out_valid[0] = 1'b1;
            o[0].mtype   = MT_REQ_ENTRY;
            o[0].dst_sid = m.src_sid;   // root SID of the RSID
            o[0].dst_id  = m.info;      // leaving port
            o[0].src_sid = sid;
            o[0].src_id  = own_id;
            o[0].info    = m.src_id;    // root ID of the RSID
          end
        end else begin
          entry_we     = 1'b1;
          go_left      = (e.f_left > e.f_right);
          out_valid[0] = 1'b1;
          o[0]         = m;
          if (go_left) en.f_left  = e.f_left - 1'b1;
          else         en.f_right = e.f_right - 1'b1;
          o[0].dst_sid = go_left ? e.left_sid : e.right_sid;
          o[0].dst_id  = ID_W'(go_left ? e.left_idx : e.right_idx) + 1'b1;
        end
      end

      MT_REQ_ENTRY: begin
        release_sid = 1'b1;
        entry_we    = 1'b1;
        en          = '0;
        lk_we       = 1'b1;
        lk_key      = {IDX_W'(m.info - 1'b1), m.dst_sid};
        out_valid   = 3'b111;
        for (int k = 0; k < 3; k++) begin
          o[k].dst_sid = m.src_sid;
          o[k].dst_id  = m.src_id;
        end
        o[0].mtype   = MT_CHG_CHILD_REPL;
        o[0].src_sid = e.left_sid;
        o[0].src_id  = (e.f_left != '0) ? ID_W'(e.left_idx) + 1'b1 : '0;
        o[0].info    = ID_W'(e.f_left);
        o[1].mtype   = MT_CHG_CHILD_REPL;
        o[1].src_sid = e.right_sid;
        o[1].src_id  = (e.f_right != '0) ? ID_W'(e.right_idx) + 1'b1 : '0;
        o[1].info    = {1'b1, IDX_W'(e.f_right)};
        o[2].mtype   = MT_CHG_PARENT;
        o[2].src_sid = e.par_sid;
        o[2].src_id  = ID_W'(e.par_idx) + 1'b1;
        o[2].info    = {1'b1, own_idx};
      end

      MT_CHG_CHILD_REPL: begin
        entry_we = 1'b1;
        if (m.info[ID_W-1]) begin
          en.f_right   = m.info[FW-1:0];
          en.right_sid = m.src_sid;
          en.right_idx = IDX_W'(m.src_id - 1'b1);
        end else begin
          en.f_left   = m.info[FW-1:0];
          en.left_sid = m.src_sid;
          en.left_idx = IDX_W'(m.src_id - 1'b1);
        end
      end

      MT_CHG_PARENT: begin
        entry_we   = 1'b1;
        en.par_sid = m.src_sid;
        en.par_idx = IDX_W'(m.src_id - 1'b1);
        if (m.info[ID_W-1]) begin
          // replacement has its whole entry: announce itself
          for (int k = 0; k < 3; k++) begin
            o[k].src_sid = sid;
            o[k].src_id  = own_id;
          end
          out_valid[0] = (e.f_left != '0);
          o[0].mtype   = MT_CHG_PARENT;
          o[0].dst_sid = e.left_sid;
          o[0].dst_id  = ID_W'(e.left_idx) + 1'b1;
          out_valid[1] = (e.f_right != '0);
          o[1].mtype   = MT_CHG_PARENT;
          o[1].dst_sid = e.right_sid;
          o[1].dst_id  = ID_W'(e.right_idx) + 1'b1;
          out_valid[2] = 1'b1;
          o[2].mtype   = MT_CHG_CHILD_PAR;
          o[2].dst_sid = m.src_sid;
          o[2].dst_id  = m.src_id;
          o[2].info    = ID_W'(m.info[IDX_W-1:0]) + 1'b1;
        end
      end

      MT_CHG_CHILD_PAR: begin
        entry_we = 1'b1;
        if (e.f_left != '0 && ID_W'(e.left_idx) + 1'b1 == m.info) begin
          en.left_sid = m.src_sid;
          en.left_idx = IDX_W'(m.src_id - 1'b1);
        end else if (e.f_right != '0 && ID_W'(e.right_idx) + 1'b1 == m.info) begin
          en.right_sid = m.src_sid;
          en.right_idx = IDX_W'(m.src_id - 1'b1);
        end
      end

      default: ;  // type 8: data packets are not handled by the controller
    endcase
  end

  assign entry_out = en;
  always_comb for (int k = 0; k < 3; k++) out_msg[k] = o[k];

endmodule
