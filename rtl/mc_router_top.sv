// mc_router_top: control path of an N x N router that circulates multicast
// packets along per-session trees of ports.
//
// N port control modules (mc_port), each a multicast control module and its
// scheduler module, exchange control messages through an N x N cross-bar
// (mc_crossbar).  The modules sit NP to a device (mc_port_chip); by default
// all N share one device, as in the 8 x 8 prototype, and a smaller NP splits
// them over N/NP devices with the cross-bar outside them.  The scheduler
// modules form one sequential greedy scheduling chain, through the devices in
// port order, that configures the cross-bar once per slot.  A slot timer
// divides the clock into six-cycle time slots and keeps the devices in step.
// The central processor that emulates the higher-layer protocols is outside:
// it gives at most one message per slot together with its destination port ID
// (1..N), and every device takes the messages for its own ports.
//
// Interface and timing: cp_valid/cp_dest/cp_msg are sampled in the first cycle
// of a slot (slot_start high).  xb_valid/xb_msg show what the cross-bar
// delivers to each port in the current slot; idle is high when no message is
// queued, in flight or being processed anywhere; err is the OR of the sticky
// error flags of the controllers.  The trees themselves live in the tree and
// lookup memories inside the controllers.
//
// The structure (Fig. 3 of the design description: CP, per-port multiplexer,
// multicast control, SGS module, cross-bar) and the grouping of port modules
// per device follow the document; the fixed order of the SGS chain and the CP
// input format are this design's choices.  NP must divide N.
module mc_router_top #(
  parameter int N  = 8,
  parameter int NS = 40,
  parameter int NP = N     // port control modules per device
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   cp_valid,
  input  logic [mc_pkg::id_w(N)-1:0]             cp_dest,
  input  logic [mc_pkg::msg_len(N, NS)-1:0]      cp_msg,
  output logic                                   slot_start,
  output logic [N-1:0]                           xb_valid,
  output logic [N-1:0][mc_pkg::msg_len(N, NS)-1:0] xb_msg,
  output logic                                   idle,
  output logic                                   err
);
  localparam int L     = mc_pkg::msg_len(N, NS);
  localparam int IDX_W = mc_pkg::idx_w(N);

  // ---------------- slot timer ----------------
  logic [2:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                      phase <= '0;
    else if (phase == 3'(mc_pkg::SLOT_CYCLES - 1))   phase <= '0;
    else                                             phase <= phase + 1'b1;
  end
  assign slot_start = (phase == 3'd0);

  // ---------------- devices ----------------
  localparam int NCHIP = N / NP;

  if (NCHIP * NP != N) begin : g_bad_np
    $error("mc_router_top: NP must divide N");
  end

  logic [NCHIP:0][N-1:0]       taken;   // SGS chain between devices
  logic [N-1:0]                sg_valid;
  logic [N-1:0][IDX_W-1:0]     sg_dest;
  logic [N-1:0][L-1:0]         sg_msg;
  logic [NCHIP-1:0]            ch_busy, ch_err;

  assign taken[0] = '0;

  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    mc_port_chip #(.N(N), .NS(NS), .NP(NP), .BASE(c * NP)) u_chip (
      .clk, .rst_n,
      .slot_sync (slot_start),
      .cp_valid, .cp_dest, .cp_msg,
      .xb_valid  (xb_valid[c*NP +: NP]),
      .xb_msg    (xb_msg[c*NP +: NP]),
      .taken_in  (taken[c]),
      .taken_out (taken[c+1]),
      .out_valid (sg_valid[c*NP +: NP]),
      .out_dest  (sg_dest[c*NP +: NP]),
      .out_msg   (sg_msg[c*NP +: NP]),
      .busy      (ch_busy[c]),
      .err       (ch_err[c])
    );
  end

  mc_crossbar #(.N(N), .W(L)) u_xbar (
    .in_valid  (sg_valid),
    .in_dest   (sg_dest),
    .in_data   (sg_msg),
    .out_valid (xb_valid),
    .out_data  (xb_msg)
  );

  assign idle = !(|ch_busy);
  assign err  = |ch_err;

endmodule
