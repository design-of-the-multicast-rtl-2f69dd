// tb_mc_router_top: end-to-end test of the router control path at its default
// size (8 ports, 40 sessions per port).
//
// A behavioural central processor issues random add/remove requests: in each
// slot a request arrives with probability 1/2, its type (add or remove), port
// and session uniformly distributed.  Requests are grouped in rounds of
// ROUND_SLOTS slots; within a round no session and no port is named twice (so
// trees are never changed by two requests at once and each port's free-SID
// list changes at most once).  After a round the testbench waits for the
// controllers to go idle, applies the same requests to its own model of the
// trees (add at the end of the shortest path, replace a leaving port by the
// port at the end of the longest path) and to a model of each port's SID
// allocation, and then compares every port's lookup memory and tree memory
// with the model: membership, SIDs, fanouts, children and parent.
//
// It also checks the six-cycle slot, the error flag, and counts each protocol
// mechanism (every message type on the cross-bar, root creation, a port that
// is its own replacement, a port replaced by another, a CP and a cross-bar
// message reaching one controller in the same slot, an SGS contention for an
// output); a mechanism never seen counts as a failure.
module tb_mc_router_top;
  localparam int N  = 8;
  localparam int NS = 40;
  localparam int IW  = $clog2(N);          // port index in the tree memory
  localparam int DW  = IW + 1;             // port ID in messages
  localparam int SW  = $clog2(NS);
  localparam int FW  = $clog2(N / 2 + 1);
  localparam int LW  = 3 + 2 * SW + 3 * DW;
  localparam int EW  = 3 * IW + 3 * SW + 2 * FW;
  localparam int KW  = IW + SW;
  localparam int ROUNDS      = 400;
  localparam int ROUND_SLOTS = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cp_valid = 1'b0;
  logic [DW-1:0] cp_dest = '0;
  logic [LW-1:0] cp_msg = '0;
  logic slot_start, idle, err;
  logic [N-1:0] xb_valid;
  logic [N-1:0][LW-1:0] xb_msg;

  always #5 clk = ~clk;

  mc_router_top dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- peeks into the memories ----------------
  logic [EW-1:0]  tree_peek [N][NS];
  logic [N-1:0][(1<<KW)-1:0] lk_valid;
  logic [SW-1:0]  lk_sid    [N][1<<KW];
  logic [N-1:0][N-1:0] sgs_nonempty;
  logic [N-1:0][N-1:0] sgs_taken_in;
  logic [N-1:0] cp_hit_p0;

  for (genvar g = 0; g < N; g++) begin : g_peek
    for (genvar k = 0; k < NS; k++) begin : g_t
      assign tree_peek[g][k] = dut.g_chip[0].u_chip.g_mod[g].u_port.u_mc.u_tree.mem[k];
    end
    for (genvar k = 0; k < (1 << KW); k++) begin : g_l
      assign lk_sid[g][k] = dut.g_chip[0].u_chip.g_mod[g].u_port.u_mc.u_lookup.sid_mem[k];
    end
    assign lk_valid[g] = dut.g_chip[0].u_chip.g_mod[g].u_port.u_mc.u_lookup.valid;
    for (genvar k = 0; k < N; k++) begin : g_q
      assign sgs_nonempty[g][k] = (dut.g_chip[0].u_chip.g_mod[g].u_port.u_sgs.qlen[k] != 0);
    end
    assign sgs_taken_in[g] = dut.g_chip[0].u_chip.taken[g];
  end

  // ---------------- reference model ----------------
  int root     [NS];
  int root_sid [NS];
  bit member   [NS][N];
  int par      [NS][N];
  int lch      [NS][N];
  int rch      [NS][N];
  int sidof    [NS][N];
  int fresh    [N];
  int stk      [N][$];

  function automatic int size_of(int s, int x);
    if (x < 0) return 0;
    return 1 + size_of(s, lch[s][x]) + size_of(s, rch[s][x]);
  endfunction

  function automatic int model_alloc(int p);
    if (stk[p].size() != 0) return stk[p].pop_back();
    fresh[p]++;
    return fresh[p] - 1;
  endfunction

  // counters of mechanisms
  int n_type [8];
  int n_root_create = 0, n_self_leave = 0, n_repl_leave = 0, n_add = 0;
  int n_dual_in = 0, n_sgs_conflict = 0, n_skipped = 0;

  function automatic void model_add(int s, int p);
    int x;
    member[s][p] = 1;
    lch[s][p] = -1;
    rch[s][p] = -1;
    sidof[s][p] = model_alloc(p);
    if (root[s] < 0) begin
      root[s] = p;
      root_sid[s] = sidof[s][p];
      par[s][p] = p;
      return;
    end
    x = root[s];
    forever begin
      if (size_of(s, lch[s][x]) <= size_of(s, rch[s][x])) begin
        if (lch[s][x] < 0) begin lch[s][x] = p; break; end
        x = lch[s][x];
      end else begin
        if (rch[s][x] < 0) begin rch[s][x] = p; break; end
        x = rch[s][x];
      end
    end
    par[s][p] = x;
  endfunction

  function automatic void model_remove(int s, int p);
    int x, r, q;
    x = root[s];
    forever begin
      if (lch[s][x] < 0 && rch[s][x] < 0) break;
      if (size_of(s, lch[s][x]) > size_of(s, rch[s][x])) x = lch[s][x];
      else x = rch[s][x];
    end
    r = x;
    q = par[s][r];
    if (lch[s][q] == r) lch[s][q] = -1; else rch[s][q] = -1;
    if (r == p) n_self_leave++;
    else begin
      n_repl_leave++;
      par[s][r] = par[s][p];
      lch[s][r] = lch[s][p];
      rch[s][r] = rch[s][p];
      if (lch[s][r] >= 0) par[s][lch[s][r]] = r;
      if (rch[s][r] >= 0) par[s][rch[s][r]] = r;
      q = par[s][p];
      if (lch[s][q] == p) lch[s][q] = r; else rch[s][q] = r;
    end
    member[s][p] = 0;
    stk[p].push_back(sidof[s][p]);
  endfunction

  function automatic logic [LW-1:0] pack(int t, int dsid, int did, int ssid, int sid_, int info);
    return {3'(t), SW'(dsid), DW'(did), SW'(ssid), DW'(sid_), DW'(info)};
  endfunction

  // compare all memories with the model
  task automatic check_all();
    for (int s = 0; s < NS; s++) begin
      if (root[s] < 0) continue;
      for (int p = 0; p < N; p++) begin
        int key;
        key = (root[s] << SW) | root_sid[s];
        check(lk_valid[p][key] == member[s][p],
              $sformatf("lookup valid s%0d p%0d exp %0d", s, p, member[s][p]));
        if (member[s][p]) begin
          logic [EW-1:0] e;
          int fr, fl, v;
          check(lk_sid[p][key] == SW'(sidof[s][p]),
                $sformatf("lookup sid s%0d p%0d got %0d exp %0d", s, p, lk_sid[p][key], sidof[s][p]));
          e  = tree_peek[p][sidof[s][p]];
          v  = 0;
          fr = int'(e[EW-1 -: FW]);
          fl = int'(e[EW-FW-1 -: FW]);
          check(fl == size_of(s, lch[s][p]) && fr == size_of(s, rch[s][p]),
                $sformatf("fanouts s%0d p%0d got %0d/%0d exp %0d/%0d", s, p, fl, fr,
                          size_of(s, lch[s][p]), size_of(s, rch[s][p])));
          // parent {sid, idx}
          check(e[2*(IW+SW) +: IW] == IW'(par[s][p]) &&
                e[2*(IW+SW)+IW +: SW] == SW'(sidof[s][par[s][p]]),
                $sformatf("parent s%0d p%0d", s, p));
          if (lch[s][p] >= 0)
            check(e[(IW+SW) +: IW] == IW'(lch[s][p]) &&
                  e[(IW+SW)+IW +: SW] == SW'(sidof[s][lch[s][p]]),
                  $sformatf("left child s%0d p%0d", s, p));
          if (rch[s][p] >= 0)
            check(e[0 +: IW] == IW'(rch[s][p]) && e[IW +: SW] == SW'(sidof[s][rch[s][p]]),
                  $sformatf("right child s%0d p%0d", s, p));
        end
      end
    end
  endtask

  // ---------------- monitors ----------------
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.phase == 3'd1) begin
        for (int p = 0; p < N; p++) begin
          if (xb_valid[p]) n_type[xb_msg[p][LW-1 -: 3]]++;
          if (xb_valid[p] && cp_hit_p0[p]) n_dual_in++;
        end
      end
      if (dut.phase == 3'd2)
        for (int g = 0; g < N; g++)
          if (|(sgs_nonempty[g] & sgs_taken_in[g])) n_sgs_conflict++;
    end
  end

  always @(posedge clk) begin
    if (dut.phase == 3'd0)
      for (int p = 0; p < N; p++) cp_hit_p0[p] <= cp_valid && int'(cp_dest) == p + 1;
  end

  // slot length: slot_start every six cycles
  longint last_start = -1;
  int slot_len_bad = 0, slots = 0;
  always @(posedge clk) begin
    if (rst_n && slot_start) begin
      if (last_start >= 0 && cycle - last_start != 6) slot_len_bad++;
      last_start <= cycle;
      slots++;
    end
  end

  // ---------------- stimulus ----------------
  typedef struct { bit add; int s; int p; } req_t;

  task automatic next_slot();
    @(negedge clk);
    while (!slot_start) @(negedge clk);
  endtask

  task automatic wait_idle();
    int quiet, waited;
    quiet = 0;
    waited = 0;
    while (quiet < 2 * 6 && waited < 20000) begin
      @(negedge clk);
      waited++;
      if (idle) quiet++; else quiet = 0;
    end
    check(quiet >= 12, "controllers did not go idle");
  endtask

  initial begin
    req_t reqs[$];
    bit   s_used [NS];
    bit   p_used [N];
    for (int s = 0; s < NS; s++) begin
      root[s] = -1;
      for (int p = 0; p < N; p++) begin
        member[s][p] = 0; lch[s][p] = -1; rch[s][p] = -1; par[s][p] = -1; sidof[s][p] = 0;
      end
    end
    for (int p = 0; p < N; p++) fresh[p] = 0;
    for (int t = 0; t < 8; t++) n_type[t] = 0;
    cp_hit_p0 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int rnd = 0; rnd < ROUNDS; rnd++) begin
      reqs.delete();
      for (int s = 0; s < NS; s++) s_used[s] = 0;
      for (int p = 0; p < N; p++) p_used[p] = 0;
      for (int k = 0; k < ROUND_SLOTS; k++) begin
        req_t r;
        next_slot();
        cp_valid = 1'b0;
        if ($urandom_range(1, 0) == 1) begin
          // sessions are filled more often than emptied early on so that trees grow deep
          r.add = ($urandom_range(99, 0) < ((rnd < ROUNDS / 3) ? 70 : 50));
          r.s   = $urandom_range(NS - 1, 0);
          r.p   = $urandom_range(N - 1, 0);
          if (s_used[r.s] || p_used[r.p] ||
              (r.add && member[r.s][r.p]) ||
              (!r.add && (!member[r.s][r.p] || root[r.s] == r.p))) begin
            n_skipped++;
          end else begin
            s_used[r.s] = 1;
            p_used[r.p] = 1;
            reqs.push_back(r);
            cp_valid = 1'b1;
            if (r.add) begin
              cp_dest = DW'(r.p + 1);
              if (root[r.s] < 0) begin
                // new session: the root port creates it (RSID names itself)
                cp_msg = pack(1, 0, r.p + 1, 0, r.p + 1, 0);
                n_root_create++;
              end else begin
                cp_msg = pack(1, 0, r.p + 1, root_sid[r.s], root[r.s] + 1, 0);
                n_add++;
              end
            end else begin
              cp_dest = DW'(root[r.s] + 1);
              cp_msg  = pack(3, root_sid[r.s], root[r.s] + 1, root_sid[r.s], root[r.s] + 1, r.p + 1);
            end
          end
        end
      end
      next_slot();
      cp_valid = 1'b0;
      wait_idle();
      foreach (reqs[i]) begin
        if (reqs[i].add) model_add(reqs[i].s, reqs[i].p);
        else             model_remove(reqs[i].s, reqs[i].p);
      end
      check_all();
      check(!err, "controller error flag raised");
    end

    check(slot_len_bad == 0 && slots > 0, "slot is not six cycles");
    for (int t = 2; t <= 7; t++)
      check(n_type[t] > 0, $sformatf("message type %0d never crossed the cross-bar", t));
    check(n_root_create > 0, "no session was created");
    check(n_add > 0, "no port was added below a root");
    check(n_self_leave > 0, "no leaving port was its own replacement");
    check(n_repl_leave > 0, "no leaving port was replaced");
    check(n_dual_in > 0, "no slot with both a CP and a cross-bar message");
    check(n_sgs_conflict > 0, "no SGS contention");
    $display("mechanisms: roots=%0d adds=%0d self_leave=%0d replaced=%0d types2..7=%0d,%0d,%0d,%0d,%0d,%0d dual_in=%0d sgs_conflict=%0d skipped=%0d slots=%0d",
             n_root_create, n_add, n_self_leave, n_repl_leave, n_type[2], n_type[3], n_type[4],
             n_type[5], n_type[6], n_type[7], n_dual_in, n_sgs_conflict, n_skipped, slots);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
