// tb_mc_msg_proc: directed cases for every message type, with expected entries
// and outgoing messages written out by hand from the protocol rules: the add
// walk (smaller fanout, left on a tie, adopt at fanout 0), the replacement walk
// (larger fanout, right on a tie, stop at a childless port), the entry
// transfer (two type 5, one type 6), the announcement (type 6 to children,
// type 7 to parent) and the child and parent rewrites.
module tb_mc_msg_proc;
  localparam int N = 8, NS = 40;
  localparam int IW = $clog2(N), DW = IW + 1, SW = $clog2(NS), FW = $clog2(N / 2 + 1);
  localparam int LW = 3 + 2 * SW + 3 * DW;
  localparam int EW = 3 * IW + 3 * SW + 2 * FW;

  typedef struct { int t, dsid, did, ssid, sidv, info; } m_t;
  typedef struct { int fr, fl, psid, pidx, lsid, lidx, rsid, ridx; } e_t;

  logic [IW-1:0] own_idx;
  logic [LW-1:0] msg_in;
  logic [SW-1:0] sid;
  logic [EW-1:0] entry_in, entry_out;
  logic entry_we, alloc, release_sid, lk_we, lk_set;
  logic [IW+SW-1:0] lk_key;
  logic [2:0] out_valid;
  logic [2:0][LW-1:0] out_msg;
  int checks = 0, failures = 0;

  mc_msg_proc #(.N(N), .NS(NS)) dut (.*);

  function automatic logic [LW-1:0] pm(m_t m);
    return {3'(m.t), SW'(m.dsid), DW'(m.did), SW'(m.ssid), DW'(m.sidv), DW'(m.info)};
  endfunction
  function automatic logic [EW-1:0] pe(e_t e);
    return {FW'(e.fr), FW'(e.fl), SW'(e.psid), IW'(e.pidx), SW'(e.lsid), IW'(e.lidx),
            SW'(e.rsid), IW'(e.ridx)};
  endfunction

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic apply(int own, m_t m, int s, e_t e);
    own_idx = IW'(own); msg_in = pm(m); sid = SW'(s); entry_in = pe(e);
    #1;
  endtask

  task automatic expect_out(int k, m_t m, string s);
    chk(out_valid[k] && out_msg[k] == pm(m), $sformatf("%s: out%0d got %h exp %h", s, k, out_msg[k], pm(m)));
  endtask

  initial begin
    e_t e0, e;
    e0 = '{0, 0, 0, 0, 0, 0, 0, 0};

    // type 1, root creation at port index 2 (ID 3), allocated SID 5
    apply(2, '{1, 0, 3, 0, 3, 0}, 5, e0);
    chk(alloc && entry_we && lk_we && lk_set && lk_key == {IW'(2), SW'(5)} && out_valid == 0, "t1 root");
    chk(entry_out == pe('{0, 0, 5, 2, 0, 0, 0, 0}), "t1 root entry");
    // type 1, new port index 4 joins session RSID (ID 2, SID 7), allocated SID 3
    apply(4, '{1, 0, 5, 7, 2, 0}, 3, e0);
    chk(alloc && lk_we && lk_set && lk_key == {IW'(1), SW'(7)}, "t1 join lookup");
    expect_out(0, '{2, 7, 2, 3, 5, 0}, "t1 join sends type 2 to root");
    chk(out_valid == 3'b001, "t1 join one message");

    // type 2 at a port with equal fanouts: left, fanout +1, forward to left child
    e = '{1, 1, 0, 0, 11, 6, 12, 7};
    apply(0, '{2, 9, 1, 3, 5, 0}, 9, e);
    chk(entry_we && entry_out == pe('{1, 2, 0, 0, 11, 6, 12, 7}), "t2 tie entry");
    expect_out(0, '{2, 11, 7, 3, 5, 0}, "t2 tie forward left");
    // type 2 with right smaller: right, forward to right child
    e = '{1, 2, 0, 0, 11, 6, 12, 7};
    apply(0, '{2, 9, 1, 3, 5, 0}, 9, e);
    chk(entry_out == pe('{2, 2, 0, 0, 11, 6, 12, 7}), "t2 right entry");
    expect_out(0, '{2, 12, 8, 3, 5, 0}, "t2 forward right");
    // type 2 at a leaf: adopt as left child and send it type 6
    apply(1, '{2, 9, 2, 3, 5, 0}, 9, e0);
    chk(entry_out == pe('{0, 1, 0, 0, 3, 4, 0, 0}), "t2 adopt left entry");
    expect_out(0, '{6, 3, 5, 9, 2, 0}, "t2 adopt sends parent");
    // type 2 with one child on the left: adopt as right child
    e = '{0, 1, 0, 0, 11, 6, 0, 0};
    apply(1, '{2, 9, 2, 3, 5, 0}, 9, e);
    chk(entry_out == pe('{1, 1, 0, 0, 11, 6, 3, 4}), "t2 adopt right entry");

    // type 3 with equal fanouts: right, fanout -1, forward
    e = '{2, 2, 0, 0, 11, 6, 12, 7};
    apply(0, '{3, 9, 1, 9, 1, 4}, 9, e);
    chk(entry_out == pe('{1, 2, 0, 0, 11, 6, 12, 7}), "t3 tie entry");
    expect_out(0, '{3, 12, 8, 9, 1, 4}, "t3 forward right");
    // type 3 with left larger
    e = '{1, 2, 0, 0, 11, 6, 12, 7};
    apply(0, '{3, 9, 1, 9, 1, 4}, 9, e);
    chk(entry_out == pe('{1, 1, 0, 0, 11, 6, 12, 7}), "t3 left entry");
    expect_out(0, '{3, 11, 7, 9, 1, 4}, "t3 forward left");
    // type 3 reaches a childless port that is not leaving: type 4 to leaving port 4
    apply(5, '{3, 2, 6, 9, 1, 4}, 2, '{0, 0, 1, 1, 0, 0, 0, 0});
    expect_out(0, '{4, 9, 4, 2, 6, 1}, "t3 requests entry");
    chk(!release_sid && !lk_we, "t3 replacement keeps entry");
    // type 3 reaches the leaving port itself
    apply(3, '{3, 2, 4, 9, 1, 4}, 2, '{0, 0, 1, 1, 0, 0, 0, 0});
    chk(release_sid && lk_we && !lk_set && lk_key == {IW'(0), SW'(9)} && out_valid == 0, "t3 self leave");

    // type 4 at leaving port index 3 (SID 2): children left (ID 7, SID 11, f 2),
    // right (ID 8, SID 12, f 1), parent (ID 2, SID 13)
    apply(3, '{4, 9, 4, 6, 6, 1}, 2, '{1, 2, 13, 1, 11, 6, 12, 7});
    chk(release_sid && lk_we && !lk_set && lk_key == {IW'(0), SW'(9)}, "t4 release");
    expect_out(0, '{5, 6, 6, 11, 7, 2}, "t4 left child");
    expect_out(1, '{5, 6, 6, 12, 8, 8 + 1}, "t4 right child");
    expect_out(2, '{6, 6, 6, 13, 2, 8 + 3}, "t4 parent");
    // type 4 with no right child
    apply(3, '{4, 9, 4, 6, 6, 1}, 2, '{0, 1, 13, 1, 11, 6, 12, 7});
    expect_out(1, '{5, 6, 6, 12, 0, 8}, "t4 absent right child");

    // type 5 writes a child
    apply(5, '{5, 6, 6, 12, 8, 8 + 1}, 6, e0);
    chk(entry_out == pe('{1, 0, 0, 0, 0, 0, 12, 7}), "t5 right");
    apply(5, '{5, 6, 6, 11, 7, 2}, 6, e0);
    chk(entry_out == pe('{0, 2, 0, 0, 11, 6, 0, 0}), "t5 left");

    // type 6 without transfer flag: parent only
    apply(5, '{6, 6, 6, 13, 2, 0}, 6, e0);
    chk(entry_out == pe('{0, 0, 13, 1, 0, 0, 0, 0}) && out_valid == 0, "t6 plain");
    // type 6 with transfer flag: announce to children and parent
    apply(5, '{6, 6, 6, 13, 2, 8 + 3}, 6, '{1, 2, 0, 0, 11, 6, 12, 7});
    chk(entry_out == pe('{1, 2, 13, 1, 11, 6, 12, 7}), "t6 xfer entry");
    expect_out(0, '{6, 11, 7, 6, 6, 0}, "t6 announce left");
    expect_out(1, '{6, 12, 8, 6, 6, 0}, "t6 announce right");
    expect_out(2, '{7, 13, 2, 6, 6, 4}, "t6 announce parent");
    apply(5, '{6, 6, 6, 13, 2, 8 + 3}, 6, e0);
    chk(out_valid == 3'b100, "t6 leaf announces to parent only");

    // type 7: replace the child with ID 4 by ID 6, SID 6
    apply(1, '{7, 13, 2, 6, 6, 4}, 13, '{1, 1, 0, 0, 5, 3, 9, 0});
    chk(entry_out == pe('{1, 1, 0, 0, 6, 5, 9, 0}), "t7 left");
    apply(1, '{7, 13, 2, 6, 6, 4}, 13, '{1, 1, 0, 0, 9, 0, 5, 3});
    chk(entry_out == pe('{1, 1, 0, 0, 9, 0, 6, 5}), "t7 right");
    apply(1, '{7, 13, 2, 6, 6, 4}, 13, '{1, 0, 0, 0, 5, 3, 9, 0});
    chk(entry_out == pe('{1, 0, 0, 0, 5, 3, 9, 0}), "t7 absent child not matched");

    // type 8 is ignored
    apply(1, '{0, 13, 2, 6, 6, 4}, 13, e0);
    chk(!entry_we && out_valid == 0 && !alloc && !release_sid, "t8 ignored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
