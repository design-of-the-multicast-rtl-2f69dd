// tb_mc_lookup_mem: after reset no RSID is known; random inserts and clears of
// RSID keys are checked with reads one cycle later against a model, including
// keys that were inserted and then cleared.
module tb_mc_lookup_mem;
  localparam int N = 8, NS = 40;
  localparam int SW = $clog2(NS);
  localparam int KW = $clog2(N) + SW;
  logic clk = 0, rst_n = 0;
  logic [KW-1:0] raddr = '0, waddr = '0;
  logic rvalid;
  logic [SW-1:0] rsid, wsid = '0;
  logic we = 0, wset = 0;
  bit mv [1 << KW];
  int ms [1 << KW];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mc_lookup_mem #(.N(N), .NS(NS)) dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int k = 0; k < (1 << KW); k++) mv[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // empty after reset
    for (int k = 0; k < (1 << KW); k += 7) begin
      @(negedge clk); raddr = KW'(k); @(posedge clk); #1;
      chk(!rvalid, "valid after reset");
    end
    for (int i = 0; i < 6000; i++) begin
      logic [KW-1:0] ra;
      @(negedge clk);
      we    = 1'($urandom_range(1, 0));
      wset  = $urandom_range(2, 0) != 0;
      waddr = KW'($urandom_range(63, 0));   // a small key range so keys are reused
      wsid  = SW'($urandom_range(NS - 1, 0));
      ra    = KW'($urandom_range(63, 0));
      raddr = ra;
      @(posedge clk); #1;
      chk(rvalid == mv[ra], $sformatf("valid key %0d", ra));
      if (mv[ra]) chk(int'(rsid) == ms[ra], $sformatf("sid key %0d", ra));
      if (we) begin mv[waddr] = wset; if (wset) ms[waddr] = int'(wsid); end
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
