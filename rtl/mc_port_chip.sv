// mc_port_chip: NP port control modules (mc_port) placed on one device, with
// the cross-bar left off the device, as when the router's control path is
// partitioned over several chips.
//
// The modules serve the consecutive ports BASE .. BASE+NP-1 (indices; the IDs
// are one higher).  The central processor's message arrives once per chip with
// its destination ID and is steered to the module it names; a message for a
// port on another chip is ignored here.  The SGS chain enters the chip, passes
// through the modules in port order and leaves it, so chips are chained in
// port order as well.  Each module has its own cross-bar input and output on
// the pins.
//
// Timing: a slot timer on the chip counts the six phases of a slot; slot_sync
// marks the first cycle of a slot (phase 0) and keeps the chips of a router in
// step.  It is enough to pulse slot_sync once after reset.  Everything else is
// as for mc_port: CP input sampled in phase 0, cross-bar input in phase 1,
// scheduled messages from phase 4 to phase 3 of the next slot, the SGS chain
// combinational.
//
// Pins: the document counts (2NP+1)L + (NP+1)(log2 N + 1) + N + NP + 5.  The
// ports here are those same groups: NP incoming messages with their valid
// bits, one CP message with its destination, NP scheduled messages with their
// cross-bar configuration (valid + destination index), and the SGS chain.
// Two groups differ.  The chain is brought out in both directions (taken_in
// and taken_out, 2N).  There are also the cp_valid, busy and err status pins.
// Placing several modules on a device and the pin groups follow the document;
// the slot synchronisation and the chain order within a chip are this
// design's own.
module mc_port_chip #(
  parameter int N    = 8,
  parameter int NS   = 40,
  parameter int NP   = 2,
  parameter int BASE = 0
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic                                      slot_sync,
  // central processor
  input  logic                                      cp_valid,
  input  logic [mc_pkg::id_w(N)-1:0]                cp_dest,
  input  logic [mc_pkg::msg_len(N, NS)-1:0]         cp_msg,
  // cross-bar outputs for the NP ports
  input  logic [NP-1:0]                             xb_valid,
  input  logic [NP-1:0][mc_pkg::msg_len(N, NS)-1:0] xb_msg,
  // SGS chain
  input  logic [N-1:0]                              taken_in,
  output logic [N-1:0]                              taken_out,
  // cross-bar inputs for the NP ports and their configuration
  output logic [NP-1:0]                             out_valid,
  output logic [NP-1:0][mc_pkg::idx_w(N)-1:0]       out_dest,
  output logic [NP-1:0][mc_pkg::msg_len(N, NS)-1:0] out_msg,
  output logic                                      busy,
  output logic                                      err
);
  localparam int L     = mc_pkg::msg_len(N, NS);
  localparam int IDX_W = mc_pkg::idx_w(N);

  // ---------------- slot timer ----------------
  logic [2:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                      phase <= '0;
    else if (slot_sync)                              phase <= 3'd1;
    else if (phase == 3'(mc_pkg::SLOT_CYCLES - 1))   phase <= '0;
    else                                             phase <= phase + 1'b1;
  end

  // ---------------- modules ----------------
  logic [NP:0][N-1:0] taken;
  logic [NP-1:0]      m_busy, m_err;

  assign taken[0]  = taken_in;
  assign taken_out = taken[NP];

  for (genvar i = 0; i < NP; i++) begin : g_mod
    mc_port #(.N(N), .NS(NS)) u_port (
      .clk, .rst_n, .phase,
      .own_idx   (IDX_W'(BASE + i)),
      .cp_valid  (cp_valid && int'(cp_dest) == BASE + i + 1),
      .cp_msg,
      .xb_valid  (xb_valid[i]),
      .xb_msg    (xb_msg[i]),
      .taken_in  (taken[i]),
      .taken_out (taken[i+1]),
      .out_valid (out_valid[i]),
      .out_dest  (out_dest[i]),
      .out_msg   (out_msg[i]),
      .busy      (m_busy[i]),
      .err       (m_err[i])
    );
  end

  assign busy = |m_busy;
  assign err  = |m_err;

endmodule
