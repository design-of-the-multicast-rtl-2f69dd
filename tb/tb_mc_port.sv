// tb_mc_port: directed test of one port control module (controller plus
// scheduler module) as port 1 of an 8-port router.
//
// The testbench plays the slot timer, the central processor, the cross-bar
// and the rest of the SGS chain.  It sends allocate requests and cross-bar
// messages, and records the scheduled message, its destination and the slot
// in which it leaves (sampled in phase 4, when the output register holds the
// new grant).  Expected messages are written out by hand from the protocol
// rules, and so are their exit slots: a message received in slot t leaves in
// slot t+2 if its output is free, a processed message with three outputs to
// one destination leaves them in three consecutive slots, and a message for
// an output that earlier modules in the chain have taken waits until that
// output is free.  In every phase 2 the chain output must be the chain input
// plus exactly the output granted in that slot.
module tb_mc_port;
  localparam int N  = 8;
  localparam int NS = 40;
  localparam int IW = $clog2(N);
  localparam int DW = IW + 1;
  localparam int SW = $clog2(NS);
  localparam int LW = 3 + 2 * SW + 3 * DW;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [2:0] phase = '0;
  logic cp_valid = 1'b0, xb_valid = 1'b0;
  logic [LW-1:0] cp_msg = '0, xb_msg = '0;
  logic [N-1:0] taken_in = '0, taken_out;
  logic out_valid, busy, err;
  logic [IW-1:0] out_dest;
  logic [LW-1:0] out_msg;

  always #5 clk = ~clk;

  mc_port #(.N(N), .NS(NS)) dut (
    .clk, .rst_n, .phase, .own_idx(IW'(0)),
    .cp_valid, .cp_msg, .xb_valid, .xb_msg,
    .taken_in, .taken_out, .out_valid, .out_dest, .out_msg, .busy, .err
  );

  int checks = 0, failures = 0;
  int slot = -1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL slot %0d: %s", slot, what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [LW-1:0] pack(int t, int dsid, int did, int ssid, int sid_, int info);
    return {3'(t), SW'(dsid), DW'(did), SW'(ssid), DW'(sid_), DW'(info)};
  endfunction

  // slot timer
  always @(posedge clk) begin
    if (!rst_n) phase <= '0;
    else        phase <= (phase == 3'd5) ? 3'd0 : phase + 3'd1;
    if (rst_n && phase == 3'd5) slot <= slot + 1;
  end

  // what leaves the module
  typedef struct { int slot; int dest; logic [LW-1:0] msg; } out_t;
  out_t got [$];
  logic [N-1:0] chain_in_p2, chain_out_p2;

  always @(posedge clk) begin
    if (rst_n && phase == 3'd2) begin
      chain_in_p2  <= taken_in;
      chain_out_p2 <= taken_out;
    end
    if (rst_n && phase == 3'd4) begin
      // the output register was loaded at the end of phase 3
      if (out_valid) begin
        out_t o;
        o.slot = slot;
        o.dest = int'(out_dest);
        o.msg  = out_msg;
        got.push_back(o);
        check(chain_out_p2 == (chain_in_p2 | (N'(1) << out_dest)),
              $sformatf("chain out %b, in %b, granted %0d", chain_out_p2, chain_in_p2, out_dest));
      end else begin
        check(chain_out_p2 == chain_in_p2,
              $sformatf("chain out %b differs from in %b with no grant", chain_out_p2, chain_in_p2));
      end
    end
  end

  // drive in the slot given, phase 0 (CP) / phase 1 (cross-bar)
  task automatic wait_slot(int t);
    while (!(slot == t && phase == 3'd0)) @(negedge clk);
  endtask

  task automatic give(int t, bit use_cp, logic [LW-1:0] cm, bit use_xb, logic [LW-1:0] xm);
    wait_slot(t);
    cp_valid = use_cp;
    cp_msg   = cm;
    xb_valid = use_xb;
    xb_msg   = xm;
    @(negedge clk);
    @(negedge clk);
    cp_valid = 1'b0;
    xb_valid = 1'b0;
  endtask

  typedef struct { int slot; int dest; logic [LW-1:0] msg; logic [LW-1:0] mask; } exp_t;
  exp_t exp_q [$];

  task automatic expect_out(int t, int dest, logic [LW-1:0] msg, logic [LW-1:0] mask);
    exp_t e;
    e.slot = t; e.dest = dest; e.msg = msg; e.mask = mask;
    exp_q.push_back(e);
  endtask

  localparam logic [LW-1:0] ALL = '1;
  // type, destination SID and ID, and the info field; port fields masked
  localparam logic [LW-1:0] NO_PORT = ~({SW'('1), DW'('1)} << DW);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // slot 0: the CP makes port 1 the root of a new session (SID 0): no output
    give(0, 1, pack(1, 0, 1, 0, 1, 0), 0, '0);
    // slot 1: join the session rooted at port 3, SID 5; SID 1 is taken here
    give(1, 1, pack(1, 0, 1, 5, 3, 0), 0, '0);
    expect_out(3, 2, pack(2, 5, 3, 1, 1, 0), ALL);
    // slot 2: join the session rooted at port 4, SID 2 (SID 2 here), while
    // output 4 is taken by earlier modules of the chain until slot 7
    taken_in = N'(1) << 3;
    give(2, 1, pack(1, 0, 1, 2, 4, 0), 0, '0);
    expect_out(7, 3, pack(2, 2, 4, 2, 1, 0), ALL);
    wait_slot(6);
    repeat (4) @(negedge clk);
    check(!out_valid || out_dest != 3, "message left through a taken output");
    wait_slot(7);
    taken_in = '0;
    // slot 8: port 5 (SID 7) asks the root to add it, and in the same slot the
    // CP asks to join the session rooted at port 2, SID 3 (SID 3 here).  The
    // CP message is processed first; the root adopts port 5 as its left child.
    give(8, 1, pack(1, 0, 1, 3, 2, 0), 1, pack(2, 0, 1, 7, 5, 0));
    expect_out(10, 1, pack(2, 3, 2, 3, 1, 0), ALL);
    expect_out(11, 4, pack(6, 7, 5, 0, 1, 0), ALL);
    // slot 12: port 6 (SID 9), the replacement, requests this port's entry of
    // the session with RSID (3, 5): two type 5 and one type 6, in that order
    give(12, 0, '0, 1, pack(4, 5, 1, 9, 6, 3));
    expect_out(14, 5, pack(5, 9, 6, 0, 0, 0), NO_PORT);
    expect_out(15, 5, pack(5, 9, 6, 0, 0, 8), NO_PORT);
    expect_out(16, 5, pack(6, 9, 6, 0, 0, 8), NO_PORT);

    wait_slot(22);
    check(got.size() == exp_q.size(),
          $sformatf("%0d messages left, %0d expected", got.size(), exp_q.size()));
    foreach (exp_q[i]) begin
      if (i < got.size()) begin
        check(got[i].slot == exp_q[i].slot,
              $sformatf("message %0d left in slot %0d, expected %0d", i, got[i].slot, exp_q[i].slot));
        check(got[i].dest == exp_q[i].dest,
              $sformatf("message %0d to output %0d, expected %0d", i, got[i].dest, exp_q[i].dest));
        check((got[i].msg & exp_q[i].mask) == (exp_q[i].msg & exp_q[i].mask),
              $sformatf("message %0d is %h, expected %h", i, got[i].msg, exp_q[i].msg));
      end
    end
    check(!busy, "still busy at the end");
    check(!err, "error flag raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
