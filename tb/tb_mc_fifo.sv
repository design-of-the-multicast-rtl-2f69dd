// tb_mc_fifo: random pushes and pops against a queue model, including
// filling the 128-word FIFO to full and draining it to empty; checks data
// order, empty, full and count every cycle.
module tb_mc_fifo;
  localparam int W = 31;
  localparam int D = 128;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  always #5 clk = ~clk;
  mc_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  task automatic step(bit do_push, bit do_pop);
    @(negedge clk);
    chk(empty == (q.size() == 0), "empty");
    chk(full == (q.size() == D), "full");
    chk(int'(count) == q.size(), "count");
    if (q.size() != 0) chk(rdata == q[0], $sformatf("data got %h exp %h", rdata, q[0]));
    push  = do_push && (q.size() < D);
    pop   = do_pop && (q.size() > 0);
    wdata = W'({$urandom, $urandom});
    @(posedge clk);
    #1;
    if (pop)  void'(q.pop_front());
    if (push) q.push_back(wdata);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 140; i++) step(1, 0);          // fill past full
    chk(full, "full after 128 pushes");
    for (int i = 0; i < 50; i++) step(1, 1);           // push and pop together when full
    for (int i = 0; i < 140; i++) step(0, 1);          // drain
    chk(empty, "empty after drain");
    for (int i = 0; i < 3000; i++) step($urandom_range(1, 0), $urandom_range(1, 0));
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
