// mc_crossbar: N x N unicast cross-bar that carries control messages between
// the ports.
//
// Each input i presents a message and a configuration (valid, destination
// index) chosen by its scheduler module; output j delivers the message of the
// input configured to it.  The scheduler guarantees that at most one input is
// configured to each output in a slot (an assertion checks it).  Purely
// combinational: in the router the cross-bar is a separate device, and here
// its outputs are sampled by the receiving controllers in the slot after the
// schedule was made.
module mc_crossbar #(
  parameter int N = 8,
  parameter int W = 27
) (
  input  logic [N-1:0]                        in_valid,
  input  logic [N-1:0][mc_pkg::idx_w(N)-1:0]  in_dest,
  input  logic [N-1:0][W-1:0]                 in_data,
  output logic [N-1:0]                        out_valid,
  output logic [N-1:0][W-1:0]                 out_data
);
  always_comb begin
    for (int j = 0; j < N; j++) begin
      out_valid[j] = 1'b0;
      out_data[j]  = '0;
      for (int i = 0; i < N; i++) begin
        if (in_valid[i] && int'(in_dest[i]) == j) begin
          out_valid[j] = 1'b1;
          out_data[j]  = out_data[j] | in_data[i];
        end
      end
    end
  end

  always_comb begin
    for (int j = 0; j < N; j++) begin
      int hits;
      hits = 0;
      for (int i = 0; i < N; i++)
        if (in_valid[i] && int'(in_dest[i]) == j) hits++;
      a_one_input_per_output: assert (hits <= 1);
    end
  end

endmodule
