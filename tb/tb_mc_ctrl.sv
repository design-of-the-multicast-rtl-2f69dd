// tb_mc_ctrl: one multicast control module (port ID 1) driven slot by slot as
// the central processor and the cross-bar would drive it.  The testbench keeps
// the six-phase slot counter itself.
//
// The sequence creates a session rooted at this port, adds three ports below
// it (adopt left, adopt right, forward left), joins a second session rooted
// elsewhere (type 2 back to that root), walks a removal (type 3), serves an
// entry request (three messages in one slot), takes a CP and a cross-bar
// message in the same slot, reuses a released SID, and drops a request for an
// unknown session with the error flag.  Every message written to the output
// FIFO is checked for content, for destination, and for the slot in which it
// is written: a message given in slot s is processed in slot s+1 when nothing
// is waiting before it, and all its outputs are written in that slot.
module tb_mc_ctrl;
  localparam int N = 8, NS = 40;
  localparam int IW = $clog2(N), DW = IW + 1, SW = $clog2(NS);
  localparam int LW = 3 + 2 * SW + 3 * DW;

  logic clk = 0, rst_n = 0;
  logic [2:0] phase = 0;
  logic [IW-1:0] own_idx = '0;
  logic cp_valid = 0, xb_valid = 0;
  logic [LW-1:0] cp_msg = '0, xb_msg = '0;
  logic of_valid, of_pop, busy, err;
  logic [DW+LW-1:0] of_data;
  int slot = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mc_ctrl #(.N(N), .NS(NS)) dut (.*);
  assign of_pop = of_valid;

  always @(posedge clk) if (rst_n) begin
    phase <= (phase == 3'd5) ? 3'd0 : phase + 1'b1;
    if (phase == 3'd5) slot <= slot + 1;
  end

  function automatic logic [LW-1:0] pm(int t, int dsid, int did, int ssid, int sid_, int info);
    return {3'(t), SW'(dsid), DW'(did), SW'(ssid), DW'(sid_), DW'(info)};
  endfunction

  typedef struct { logic [LW-1:0] m; int slot; } exp_t;
  exp_t exp_q[$];
  int pushes = 0;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL slot %0d: %s", slot, s); end
  endtask

  // every write into the output FIFO
  always @(posedge clk) begin
    if (rst_n && dut.of_push) begin
      pushes++;
      if (exp_q.size() == 0) chk(0, $sformatf("unexpected output %h", dut.of_wdata));
      else begin
        exp_t x;
        x = exp_q.pop_front();
        chk(dut.of_wdata[LW-1:0] == x.m, $sformatf("output got %h exp %h", dut.of_wdata[LW-1:0], x.m));
        chk(dut.of_wdata[LW +: DW] == x.m[2 * DW + SW +: DW], "destination ID field");
        chk(slot == x.slot, $sformatf("output in slot %0d, expected slot %0d", slot, x.slot));
      end
    end
  end

  // present messages for one slot: CP in phase 0, cross-bar in phase 1
  task automatic give(bit c, logic [LW-1:0] cm, bit x, logic [LW-1:0] xm);
    @(negedge clk);
    while (phase != 3'd0) @(negedge clk);
    cp_valid = c; cp_msg = cm; xb_valid = x; xb_msg = xm;
    @(negedge clk); @(negedge clk);
    cp_valid = 0; xb_valid = 0;
  endtask

  task automatic expect_msg(logic [LW-1:0] m, int s);
    exp_t x;
    x.m = m; x.slot = s;
    exp_q.push_back(x);
  endtask

  task automatic idle_slots(int k);
    repeat (6 * k) @(negedge clk);
  endtask

  initial begin
    int s0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    idle_slots(1);

    // session A rooted here: gets SID 0
    s0 = slot + 1;
    give(1, pm(1, 0, 1, 0, 1, 0), 0, '0);
    idle_slots(1);
    // port 3 (SID 4) joins: adopted as left child
    s0 = slot + 1;
    expect_msg(pm(6, 4, 3, 0, 1, 0), s0 + 1);
    give(0, '0, 1, pm(2, 0, 1, 4, 3, 0));
    idle_slots(1);
    // port 5 (SID 2) joins: adopted as right child
    s0 = slot + 1;
    expect_msg(pm(6, 2, 5, 0, 1, 0), s0 + 1);
    give(0, '0, 1, pm(2, 0, 1, 2, 5, 0));
    idle_slots(1);
    // port 6 (SID 7) joins: fanouts equal, forwarded to the left child
    s0 = slot + 1;
    expect_msg(pm(2, 4, 3, 7, 6, 0), s0 + 1);
    give(0, '0, 1, pm(2, 0, 1, 7, 6, 0));
    idle_slots(1);
    // session B rooted at port 2, SID 9: this port gets SID 1, asks the root
    s0 = slot + 1;
    expect_msg(pm(2, 9, 2, 1, 1, 0), s0 + 1);
    give(1, pm(1, 0, 1, 9, 2, 0), 0, '0);
    idle_slots(1);
    // removal of port 5 from session A: left fanout 2 > right 1, goes left
    s0 = slot + 1;
    expect_msg(pm(3, 4, 3, 0, 1, 5), s0 + 1);
    give(1, pm(3, 0, 1, 0, 1, 5), 0, '0);
    idle_slots(1);
    // session B: parent set, then an entry request: three messages in one slot
    give(0, '0, 1, pm(6, 1, 1, 9, 2, 0));
    idle_slots(1);
    s0 = slot + 1;
    expect_msg(pm(5, 3, 7, 0, 0, 0), s0 + 1);
    expect_msg(pm(5, 3, 7, 0, 0, 8), s0 + 1);
    expect_msg(pm(6, 3, 7, 9, 2, 8), s0 + 1);
    give(0, '0, 1, pm(4, 9, 1, 3, 7, 2));
    idle_slots(1);
    // CP and cross-bar message in the same slot: session C rooted at port 4
    // (SID 5) reuses the released SID 1; then the root of A takes a parent
    s0 = slot + 1;
    expect_msg(pm(2, 5, 4, 1, 1, 0), s0 + 1);
    give(1, pm(1, 0, 1, 5, 4, 0), 1, pm(7, 0, 1, 6, 6, 5));
    idle_slots(2);
    // type 7 above changed the right child (port 5) of A's root to port 6:
    // a removal walk now goes right (fanouts 1/1, tie) to port 6
    s0 = slot + 1;
    expect_msg(pm(3, 6, 6, 0, 1, 3), s0 + 1);
    give(1, pm(3, 0, 1, 0, 1, 3), 0, '0);
    idle_slots(1);
    chk(!err, "no error before the bad request");
    // entry request for a session unknown here: dropped, error flag
    give(0, '0, 1, pm(4, 30, 1, 3, 7, 8));
    idle_slots(2);
    chk(err, "error flag for unknown RSID");
    chk(exp_q.size() == 0, $sformatf("%0d expected outputs missing", exp_q.size()));
    chk(!busy, "idle at end");
    chk(pushes == 10, "ten outputs");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
