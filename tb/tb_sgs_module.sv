// tb_sgs_module: one scheduler module fed from a model FIFO with random
// destinations, while the outputs already taken by earlier modules of the
// chain (taken_in) are random.  A queue model per destination checks that:
// the module grants only an output not taken, grants whenever it holds a
// message for a free output (maximality), passes on taken_in plus its grant,
// and delivers the messages of each destination in arrival order, one per
// slot, on the output register in the slot of the grant.  A phase in which
// every output is taken fills the message memory: the module must stop taking
// messages at F = 8N.
module tb_sgs_module;
  localparam int N = 8, NS = 40, F = 8 * N;
  localparam int IW = $clog2(N), DW = IW + 1, SW = $clog2(NS);
  localparam int LW = 3 + 2 * SW + 3 * DW;

  logic clk = 0, rst_n = 0;
  logic [2:0] phase = 0;
  logic in_valid, in_pop, out_valid, busy;
  logic [DW+LW-1:0] in_data;
  logic [N-1:0] taken_in = '0, taken_out;
  logic [IW-1:0] out_dest;
  logic [LW-1:0] out_msg;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  sgs_module #(.N(N), .NS(NS)) dut (.*);

  logic [DW+LW-1:0] src_q[$];     // the controller's output FIFO
  logic [LW-1:0] voq[N][$];       // model of the stored queues
  int stored = 0;
  int granted = -1;

  assign in_valid = src_q.size() != 0;
  assign in_data  = in_valid ? src_q[0] : '0;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  always @(posedge clk) if (rst_n) phase <= (phase == 3'd5) ? 3'd0 : phase + 1'b1;

  int block_all = 0;
  bit pop_seen = 0;

  // the model FIFO is popped half a cycle after the module took its word
  always @(negedge clk) if (pop_seen) begin
    logic [DW+LW-1:0] w;
    w = src_q.pop_front();
    voq[int'(w[LW +: DW]) - 1].push_back(w[LW-1:0]);
    stored++;
  end
  always @(posedge clk) if (rst_n) begin
    pop_seen <= in_pop;
    if (phase == 3'd0) chk(in_pop == (in_valid && stored < F), "takes a message exactly when there is room");
    if (phase == 3'd2) begin
      bit any;
      any = 0;
      for (int j = 0; j < N; j++) if (voq[j].size() != 0 && !taken_in[j]) any = 1;
      granted = -1;
      for (int j = 0; j < N; j++) if (taken_out[j] && !taken_in[j]) granted = j;
      chk($countones(taken_out & ~taken_in) == (any ? 1 : 0), "maximal: one grant iff a free output is wanted");
      chk((taken_out & taken_in) == taken_in, "taken set passed on");
      if (granted >= 0) chk(voq[granted].size() != 0, "grant for a non-empty queue");
    end
    if (phase == 3'd4) begin
      chk(out_valid == (granted >= 0), "output valid follows grant");
      if (granted >= 0) begin
        logic [LW-1:0] m;
        m = voq[granted].pop_front();
        stored--;
        chk(int'(out_dest) == granted && out_msg == m,
            $sformatf("dest %0d msg %h exp %0d %h", out_dest, out_msg, granted, m));
      end
    end
  end

  // taken_in changes at the start of each slot
  always @(negedge clk) if (phase == 3'd0) begin
    if (block_all) taken_in = '1;
    else taken_in = N'($urandom) & N'($urandom);
  end

  task automatic add_msgs(int k);
    for (int i = 0; i < k; i++) begin
      int d;
      d = $urandom_range(N - 1, 0);
      src_q.push_back({DW'(d + 1), LW'($urandom)});
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    block_all = 1;
    add_msgs(F + 10);
    repeat (6 * (F + 20)) @(negedge clk);
    chk(stored == F && src_q.size() == 10, "memory holds exactly F messages");
    block_all = 0;
    repeat (6 * 200) @(negedge clk);
    for (int r = 0; r < 300; r++) begin
      if ($urandom_range(1, 0)) add_msgs($urandom_range(2, 0));
      repeat (6) @(negedge clk);
    end
    repeat (6 * 400) @(negedge clk);
    chk(stored == 0 && src_q.size() == 0 && !busy, "all messages delivered");
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
