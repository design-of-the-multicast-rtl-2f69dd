// mc_fifo: first-in first-out buffer for control messages, with its controller.
//
// Each multicast control module has two of them: the input FIFO holds
// messages from the central processor and the cross-bar until the controller
// takes them, the output FIFO holds the up to three messages the controller
// makes per time slot until the scheduler module takes them.  The document
// sizes both at 128 messages; the width is the message length (input) or the
// message length plus a destination ID (output).
//
// Interface: push/wdata write one word per clock; rdata always shows the
// oldest word (read is combinational), pop removes it.  A push and a pop may
// happen in the same cycle.  Pushing when full or popping when empty is a
// protocol error, checked by assertions; the caller guards both.
module mc_fifo #(
  parameter int WIDTH = 27,
  parameter int DEPTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push && !full) mem[wr_ptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push && !full)  wr_ptr <= inc(wr_ptr);
      if (pop  && !empty) rd_ptr <= inc(rd_ptr);
      count <= count + ($clog2(DEPTH+1))'(push && !full) - ($clog2(DEPTH+1))'(pop && !empty);
    end
  end

  assign rdata = mem[rd_ptr];
  assign empty = (count == '0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
