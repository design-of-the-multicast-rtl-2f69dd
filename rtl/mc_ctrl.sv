// mc_ctrl: the multicast control module of one router port.
//
// It keeps, for every multicast session whose packets the port forwards, the
// port's place in the session's distribution tree, and updates it from the
// internal control messages the ports exchange.  Inside: an input FIFO fed
// through a multiplexer from the central processor (CP) and from the
// cross-bar, the local lookup memory (RSID -> local SID), the tree memory,
// the message-processing rules (mc_msg_proc), a SID allocator and an output
// FIFO whose words carry a message and the destination port for the cross-bar.
//
// Timing: a time slot is six clock cycles; phase (0..5) comes from the router's
// slot timer.  Up to two messages arrive per slot and are written in different
// phases; one message is processed per slot and up to three are produced:
//   phase 0  write the CP message (if any); take the oldest message
//   phase 1  write the cross-bar message (if any); read the lookup memory
//   phase 2  resolve the local SID; read the tree memory
//   phase 3  apply the rules; write outgoing message 0
//   phase 4  write tree and lookup memory, allocate/free the SID; message 1
//   phase 5  write outgoing message 2
// So a message taken in phase 0 of a slot has its outputs in the output FIFO
// at the end of the same slot.  cp_valid/cp_msg and xb_valid/xb_msg must be
// stable in phases 0 and 1 respectively.
//
// The six-phase schedule and the two 128-deep FIFOs follow the document; the
// phase assignment, the SID allocator and the error flags are this design's
// own.  Errors (a full FIFO, no free tree entry, an RSID not in the lookup
// memory) drop the message and raise a sticky flag.
module mc_ctrl #(
  parameter int N          = 8,
  parameter int NS         = 40,
  parameter int FIFO_DEPTH = mc_pkg::FIFO_DEPTH
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [2:0]                             phase,
  input  logic [mc_pkg::idx_w(N)-1:0]            own_idx,
  // from the central processor
  input  logic                                   cp_valid,
  input  logic [mc_pkg::msg_len(N, NS)-1:0]      cp_msg,
  // from the cross-bar
  input  logic                                   xb_valid,
  input  logic [mc_pkg::msg_len(N, NS)-1:0]      xb_msg,
  // output FIFO towards the scheduler module: {destination ID, message}
  output logic                                   of_valid,
  output logic [mc_pkg::id_w(N)+mc_pkg::msg_len(N, NS)-1:0] of_data,
  input  logic                                   of_pop,
  output logic                                   busy,
  output logic                                   err
);
  import mc_pkg::*;
  `include "mc_types.svh"

  localparam int KW = IDX_W + SID_W;
  localparam int OW = ID_W + L;

  // ---------------- input FIFO and its source multiplexer ----------------
  logic          if_push, if_pop, if_empty, if_full;
  logic [L-1:0]  if_wdata, if_rdata;

  always_comb begin
    if_push  = 1'b0;
    if_wdata = cp_msg;
    if (phase == 3'd0 && cp_valid) begin
      if_push  = !if_full;
      if_wdata = cp_msg;
    end else if (phase == 3'd1 && xb_valid) begin
      if_push  = !if_full;
      if_wdata = xb_msg;
    end
  end
  assign if_pop = (phase == 3'd0) && !if_empty;

  mc_fifo #(.WIDTH(L), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n, .push(if_push), .wdata(if_wdata), .pop(if_pop),
    .rdata(if_rdata), .empty(if_empty), .full(if_full), .count()
  );

  // ---------------- message being processed ----------------
  logic [KW-1:0]    lk_raddr;
  logic             lk_rvalid;
  logic [SID_W-1:0] lk_rsid;
  logic             lk_we, lk_set, pr_lk_we, pr_lk_set;
  logic [KW-1:0]    lk_waddr, pr_lk_key;
  logic [SID_W-1:0] al_sid;
  logic             al_avail, al_alloc, al_release;
  mc_msg_t         cur;
  logic            cur_v;
  logic [SID_W-1:0] sid_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_v <= 1'b0;
      cur   <= '0;
    end else if (phase == 3'd0) begin
      cur_v <= !if_empty;
      if (!if_empty) cur <= mc_msg_t'(if_rdata);
    end else if (phase == 3'd2 && cur_v) begin
      // drop a message that cannot be resolved to a tree entry
      if ((cur.mtype == MT_REQ_ENTRY && !lk_rvalid) ||
          (cur.mtype == MT_ALLOC && !al_avail) ||
          (cur.mtype == MT_DATA))
        cur_v <= 1'b0;
    end
  end

  // ---------------- lookup memory ----------------

  assign lk_raddr = {IDX_W'(cur.info - 1'b1), cur.dst_sid};

  mc_lookup_mem #(.N(N), .NS(NS)) u_lookup (
    .clk, .rst_n, .raddr(lk_raddr), .rvalid(lk_rvalid), .rsid(lk_rsid),
    .we(lk_we), .wset(lk_set), .waddr(lk_waddr), .wsid(sid_r)
  );

  // ---------------- SID allocator ----------------

  mc_sid_alloc #(.NS(NS)) u_alloc (
    .clk, .rst_n, .sid(al_sid), .avail(al_avail),
    .alloc(al_alloc), .release_sid(al_release), .free_sid(sid_r)
  );

  // ---------------- SID resolution and tree memory ----------------
  logic [SID_W-1:0] sid_res;
  logic [MW-1:0]    tm_rdata;
  logic             tm_we;

  always_comb begin
    unique case (cur.mtype)
      MT_ALLOC:     sid_res = al_sid;
      MT_REQ_ENTRY: sid_res = lk_rsid;
      default:      sid_res = cur.dst_sid;
    endcase
  end

  always_ff @(posedge clk) begin
    if (phase == 3'd2) sid_r <= sid_res;
  end

  // ---------------- message processing ----------------
  logic              pr_entry_we, pr_alloc, pr_release;
  logic [MW-1:0]     pr_entry;
  logic [2:0]        pr_out_v;
  logic [2:0][L-1:0] pr_out;

  mc_msg_proc #(.N(N), .NS(NS)) u_proc (
    .own_idx, .msg_in(cur), .sid(sid_r), .entry_in(tm_rdata),
    .entry_we(pr_entry_we), .entry_out(pr_entry),
    .alloc(pr_alloc), .release_sid(pr_release),
    .lk_we(pr_lk_we), .lk_set(pr_lk_set), .lk_key(pr_lk_key),
    .out_valid(pr_out_v), .out_msg(pr_out)
  );

  // results of phase 3, used in phases 4 and 5
  logic              r_entry_we, r_alloc, r_release, r_lk_we, r_lk_set;
  logic [MW-1:0]     r_entry;
  logic [KW-1:0]     r_lk_key;
  logic [2:1]        r_out_v;
  logic [2:1][L-1:0] r_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_entry_we <= 1'b0;
      r_alloc    <= 1'b0;
      r_release  <= 1'b0;
      r_lk_we    <= 1'b0;
      r_out_v    <= '0;
    end else if (phase == 3'd3) begin
      r_entry_we <= cur_v && pr_entry_we;
      r_alloc    <= cur_v && pr_alloc;
      r_release  <= cur_v && pr_release;
      r_lk_we    <= cur_v && pr_lk_we;
      r_out_v    <= cur_v ? pr_out_v[2:1] : 2'b00;
    end
  end

  always_ff @(posedge clk) begin
    if (phase == 3'd3) begin
      r_entry  <= pr_entry;
      r_lk_set <= pr_lk_set;
      r_lk_key <= pr_lk_key;
      r_out    <= pr_out[2:1];
    end
  end

  assign tm_we      = (phase == 3'd4) && r_entry_we;
  assign lk_we      = (phase == 3'd4) && r_lk_we;
  assign lk_set     = r_lk_set;
  assign lk_waddr   = r_lk_key;
  assign al_alloc   = (phase == 3'd4) && r_alloc;
  assign al_release = (phase == 3'd4) && r_release;

  mc_tree_mem #(.N(N), .NS(NS)) u_tree (
    .clk, .raddr(sid_res), .rdata(tm_rdata),
    .we(tm_we), .waddr(sid_r), .wdata(r_entry)
  );

  // ---------------- output FIFO ----------------
  logic          of_push, of_empty, of_full;
  mc_msg_t       of_msg;
  logic [OW-1:0] of_wdata;

  always_comb begin
    of_push = 1'b0;
    of_msg  = mc_msg_t'(pr_out[0]);
    unique case (phase)
      3'd3: begin of_push = cur_v && pr_out_v[0]; of_msg = mc_msg_t'(pr_out[0]); end
      3'd4: begin of_push = r_out_v[1];           of_msg = mc_msg_t'(r_out[1]);  end
      3'd5: begin of_push = r_out_v[2];           of_msg = mc_msg_t'(r_out[2]);  end
      default: ;
    endcase
  end
  assign of_wdata = {of_msg.dst_id, of_msg};

  mc_fifo #(.WIDTH(OW), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n, .push(of_push && !of_full), .wdata(of_wdata), .pop(of_pop),
    .rdata(of_data), .empty(of_empty), .full(of_full), .count()
  );
  assign of_valid = !of_empty;

  // ---------------- status ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err <= 1'b0;
    else if ((phase == 3'd0 && cp_valid && if_full) ||
             (phase == 3'd1 && xb_valid && if_full) ||
             (of_push && of_full) ||
             (phase == 3'd2 && cur_v && cur.mtype == MT_REQ_ENTRY && !lk_rvalid) ||
             (phase == 3'd2 && cur_v && cur.mtype == MT_ALLOC && !al_avail))
      err <= 1'b1;
  end

  assign busy = cur_v || !if_empty || !of_empty;

endmodule
