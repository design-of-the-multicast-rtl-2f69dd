// sgs_module: the scheduler module of one router port.
//
// It takes control messages from its multicast control module's output FIFO,
// stores them in a message memory of F = 8N cells, and keeps one queue per
// destination port (virtual output queue) as a linked list through that
// memory: a link memory, head and tail pointers per destination, and a free
// list.  Once per time slot the N scheduler modules build a cross-bar matching
// by sequential greedy scheduling (SGS): module 0 picks first, then module 1,
// and so on; each module receives the set of outputs already taken
// (taken_in, N bits) and picks, round robin, one not-taken output for which it
// holds a message, and passes the set on (taken_out).  The result is a maximal
// matching: no input with a message for a free output is left unmatched.
//
// Timing, per six-cycle slot (phase from the slot timer):
//   phase 0  take one message from the controller's output FIFO, store it
//   phase 1  link it to the tail of its destination queue
//   phase 2  the SGS chain settles; grant registered
//   phase 3  read the granted head message into the output register, free it
// The output register (message plus cross-bar configuration: valid and
// destination index, clog2(N)+1 bits) is stable from phase 4 of one slot to
// phase 3 of the next, when the receiving controller samples it (phase 1).
//
// The document gives the module's memories (linked list, pointers, output,
// message memory of F = 8N messages) and the SGS principle; the round-robin
// choice among outputs, the fixed order in which the modules choose, and the
// fresh-counter free list are this design's choices.
module sgs_module #(
  parameter int N  = 8,
  parameter int NS = 40,
  parameter int F  = 8 * N
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [2:0]                             phase,
  // from the controller's output FIFO: {destination ID, message}
  input  logic                                   in_valid,
  input  logic [mc_pkg::id_w(N)+mc_pkg::msg_len(N, NS)-1:0] in_data,
  output logic                                   in_pop,
  // SGS chain
  input  logic [N-1:0]                           taken_in,
  output logic [N-1:0]                           taken_out,
  // to the cross-bar
  output logic                                   out_valid,
  output logic [mc_pkg::idx_w(N)-1:0]            out_dest,
  output logic [mc_pkg::msg_len(N, NS)-1:0]      out_msg,
  output logic                                   busy
);
  localparam int L     = mc_pkg::msg_len(N, NS);
  localparam int ID_W  = mc_pkg::id_w(N);
  localparam int IDX_W = mc_pkg::idx_w(N);
  localparam int PW    = (F > 1) ? $clog2(F) : 1;
  localparam int CW    = $clog2(F + 1);

  logic [L-1:0]  msg_mem [F];
  logic [PW-1:0] link    [F];
  logic [PW-1:0] head    [N];
  logic [PW-1:0] tail    [N];
  logic [CW-1:0] qlen    [N];
  logic [CW-1:0] used;       // cells holding a message
  logic [CW-1:0] fresh;      // next never-used cell
  logic [PW-1:0] free_head;  // list of released cells

  // ---------------- enqueue (phases 0 and 1) ----------------
  logic [ID_W-1:0]  in_dest_id;
  logic [IDX_W-1:0] in_dest;
  logic [PW-1:0]    new_cell;
  logic [PW-1:0]    enq_cell;
  logic [IDX_W-1:0] enq_dest;
  logic             enq_v;      // a message was stored in phase 0
  logic             enq_link;   // a tail link is to be written in phase 1

  assign in_dest_id = in_data[L +: ID_W];
  assign in_dest    = IDX_W'(in_dest_id - 1'b1);
  assign new_cell   = (fresh < CW'(F)) ? PW'(fresh) : free_head;
  assign in_pop     = (phase == 3'd0) && in_valid && (used < CW'(F));

  // ---------------- SGS choice (phase 2) ----------------
  logic [N-1:0]     req;
  logic             gnt_v;
  logic [IDX_W-1:0] gnt;
  logic [IDX_W-1:0] rr;
  logic             g_v;
  logic [IDX_W-1:0] g_idx;

  logic [IDX_W:0] rr_j;   // candidate output, rr + k modulo N

  always_comb begin
    rr_j = '0;
    for (int j = 0; j < N; j++) req[j] = (qlen[j] != '0) && !taken_in[j];
    gnt_v = 1'b0;
    gnt   = '0;
    for (int k = 0; k < N; k++) begin
      rr_j = (IDX_W+1)'(rr) + (IDX_W+1)'(k);
      if (rr_j >= (IDX_W+1)'(N)) rr_j = rr_j - (IDX_W+1)'(N);
      if (!gnt_v && req[rr_j[IDX_W-1:0]]) begin
        gnt_v = 1'b1;
        gnt   = rr_j[IDX_W-1:0];
      end
    end
    taken_out = taken_in;
    if (gnt_v) taken_out[gnt] = 1'b1;
  end

  // ---------------- memories ----------------
  logic [PW-1:0] deq_cell;
  assign deq_cell = head[g_idx];

  always_ff @(posedge clk) begin
    if (in_pop) msg_mem[new_cell] <= in_data[L-1:0];
    if (phase == 3'd1 && enq_link) link[tail[enq_dest]] <= enq_cell;
    if (phase == 3'd3 && g_v)      link[deq_cell] <= free_head;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used      <= '0;
      fresh     <= '0;
      free_head <= '0;
      enq_v     <= 1'b0;
      enq_link  <= 1'b0;
      enq_cell  <= '0;
      enq_dest  <= '0;
      rr        <= '0;
      g_v       <= 1'b0;
      g_idx     <= '0;
      out_valid <= 1'b0;
      out_dest  <= '0;
      out_msg   <= '0;
      for (int j = 0; j < N; j++) begin
        qlen[j] <= '0;
        head[j] <= '0;
        tail[j] <= '0;
      end
    end else begin
      unique case (phase)
        3'd0: begin
          enq_link <= 1'b0;
          enq_v    <= in_pop;
          if (in_pop) begin
            if (fresh < CW'(F)) fresh <= fresh + 1'b1;
            else                free_head <= link[free_head];
            used     <= used + 1'b1;
            enq_cell <= new_cell;
            enq_dest <= in_dest;
            if (qlen[in_dest] == '0) head[in_dest] <= new_cell;
            else                     enq_link      <= 1'b1;
            qlen[in_dest] <= qlen[in_dest] + 1'b1;
          end
        end
        3'd1: begin
          if (enq_v) tail[enq_dest] <= enq_cell;
        end
        3'd2: begin
          g_v   <= gnt_v;
          g_idx <= gnt;
          if (gnt_v) rr <= (int'(gnt) == N - 1) ? '0 : gnt + 1'b1;
        end
        3'd3: begin
          out_valid <= g_v;
          out_dest  <= g_idx;
          out_msg   <= msg_mem[deq_cell];
          if (g_v) begin
            head[g_idx] <= link[deq_cell];
            qlen[g_idx] <= qlen[g_idx] - 1'b1;
            free_head   <= deq_cell;
            used        <= used - 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  assign busy = (used != '0) || out_valid;

  a_one_hot_grant: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == 3'd2 && gnt_v) |-> !taken_in[gnt]);

endmodule
