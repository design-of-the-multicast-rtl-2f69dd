// tb_mc_tree_mem: writes random entries at random SIDs, reads them back and
// checks the data one cycle after the address (synchronous read), against a
// model array.  Also checks that a read and a write of the same cycle return
// the old entry.
module tb_mc_tree_mem;
  localparam int N = 8, NS = 40;
  localparam int SW = $clog2(NS);
  localparam int EW = 3 * $clog2(N) + 3 * SW + 2 * $clog2(N / 2 + 1);
  logic clk = 0;
  logic [SW-1:0] raddr = '0, waddr = '0;
  logic [EW-1:0] rdata, wdata = '0;
  logic we = 0;
  logic [EW-1:0] model [NS];
  bit written [NS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mc_tree_mem #(.N(N), .NS(NS)) dut (.*);

  initial begin
    for (int k = 0; k < NS; k++) written[k] = 0;
    for (int i = 0; i < 4000; i++) begin
      logic [SW-1:0] ra;
      @(negedge clk);
      we    = $urandom_range(1, 0);
      waddr = SW'($urandom_range(NS - 1, 0));
      wdata = EW'({$urandom, $urandom});
      ra    = ($urandom_range(3, 0) == 0) ? waddr : SW'($urandom_range(NS - 1, 0));
      raddr = ra;
      @(posedge clk);
      #1;
      if (written[ra]) begin
        checks++;
        if (rdata != model[ra]) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d got %h exp %h", ra, rdata, model[ra]);
        end
      end
      if (we) begin model[waddr] = wdata; written[waddr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
