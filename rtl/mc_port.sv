// mc_port: the port control module of one router port, i.e. the multicast
// control module (mc_ctrl) joined with the port's scheduler module
// (sgs_module).
//
// The controller's output FIFO feeds the scheduler's message memory; the
// scheduler takes part in the sequential greedy scheduling chain through
// taken_in/taken_out and drives this port's cross-bar input.  This is the unit
// that is repeated per port in the router and that is placed several to a
// chip when the cross-bar sits on a separate device, so its ports are the
// signals such a chip brings out for each module: the control message from
// the cross-bar with its valid bit, the central processor's message with its
// valid bit, the scheduled message with the cross-bar configuration (valid
// and destination), and the N-bit SGS chain.
//
// Timing (six-cycle slot, phase from the router's slot timer): cp_valid/cp_msg
// are sampled in phase 0 and xb_valid/xb_msg in phase 1; a message received in
// slot s is processed in slot s+1 and, if its destination output is free,
// leaves on out_valid/out_dest/out_msg from phase 4 of slot s+2 to phase 3 of
// slot s+3.  taken_out depends combinationally on taken_in.
//
// Joining the two modules into one per-port unit follows the document; the
// signal names and the busy/err status outputs are this design's own.
module mc_port #(
  parameter int N  = 8,
  parameter int NS = 40
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [2:0]                             phase,
  input  logic [mc_pkg::idx_w(N)-1:0]            own_idx,
  // central processor
  input  logic                                   cp_valid,
  input  logic [mc_pkg::msg_len(N, NS)-1:0]      cp_msg,
  // cross-bar output of this port
  input  logic                                   xb_valid,
  input  logic [mc_pkg::msg_len(N, NS)-1:0]      xb_msg,
  // SGS chain
  input  logic [N-1:0]                           taken_in,
  output logic [N-1:0]                           taken_out,
  // cross-bar input of this port and its configuration
  output logic                                   out_valid,
  output logic [mc_pkg::idx_w(N)-1:0]            out_dest,
  output logic [mc_pkg::msg_len(N, NS)-1:0]      out_msg,
  output logic                                   busy,
  output logic                                   err
);
  localparam int L    = mc_pkg::msg_len(N, NS);
  localparam int ID_W = mc_pkg::id_w(N);

  logic            of_valid, of_pop, mc_busy, sg_busy;
  logic [ID_W+L-1:0] of_data;

  mc_ctrl #(.N(N), .NS(NS)) u_mc (
    .clk, .rst_n, .phase, .own_idx,
    .cp_valid, .cp_msg, .xb_valid, .xb_msg,
    .of_valid, .of_data, .of_pop,
    .busy (mc_busy),
    .err
  );

  sgs_module #(.N(N), .NS(NS)) u_sgs (
    .clk, .rst_n, .phase,
    .in_valid (of_valid),
    .in_data  (of_data),
    .in_pop   (of_pop),
    .taken_in, .taken_out,
    .out_valid, .out_dest, .out_msg,
    .busy     (sg_busy)
  );

  assign busy = mc_busy || sg_busy;

endmodule
