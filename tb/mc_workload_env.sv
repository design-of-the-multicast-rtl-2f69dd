// mc_workload_env: the functional workload environment of the router control
// path, shared by the workload testbenches at different sizes.
//
// It holds a router (mc_router_top with N ports, NS tree entries per port and
// NP port control modules per device),
// a behavioural central processor, a reference model of every tree and of
// every port's SID allocation, and a whitebox monitor that knows when each
// operation has finished.
//
// Workload: RUNS independent simulations of SIM_SLOTS time slots each, every
// one starting from reset with no sessions.  In every slot a request arrives
// with probability 1/2; it is an add or a remove with probability 1/2 each,
// names a port uniformly among the N ports and a session uniformly among
// SESSIONS sessions.  A request that cannot apply (adding a member, removing a
// port that is not a member, or removing the root) is discarded, as a
// higher-layer protocol would not issue it.  Operations on one session are
// serialised, as the protocol requires: a request for a session whose previous
// operation is still under way is discarded too.  Operations on different
// sessions overlap freely, also on the same port.
//
// How it checks: the monitor watches every controller at the end of its
// processing phase.  It attributes the message being processed to its session
// (type 1 by the order of CP requests per port, every other type by the port's
// tree-memory address) and keeps for each session the number of its messages
// still in the FIFOs, the schedulers or the cross-bar: +1 for a CP request,
// +k-1 for a processed message that produced k messages.  When the count of a
// session returns to zero its operation has finished, and in the next slot the
// environment compares that session's lookup and tree memory words at every
// port with its model of the tree (add at the end of the shortest path,
// replace a leaving port by the port at the end of the longest path).  Each
// port's SID allocation is modelled in the order the port processes
// allocations and releases, so the SIDs are checked as well.  After each run
// the router must go idle with no session outstanding and no error.  The
// memories are read through hierarchical references with a runtime index, so
// the cost of a check does not grow with the size of the lookup memory.
//
// Mechanisms counted (one never seen is a failure): every message type 2..7 on
// the cross-bar, root creation, add below a root, self-leave, replacement by
// another port, two sessions' operations in flight together, and a discarded
// request for a busy session.
//
// Interface: done rises when all runs are over; checks and failures are the
// running totals.  The testbench around it owns the watchdog and the result
// line.
module mc_workload_env #(
  parameter int N         = 8,
  parameter int NS        = 40,
  parameter int NP        = N,
  parameter int SESSIONS  = NS,
  parameter int RUNS      = 50,
  parameter int SIM_SLOTS = 350
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int IW  = $clog2(N);
  localparam int DW  = IW + 1;
  localparam int SW  = $clog2(NS);
  localparam int FW  = $clog2(N / 2 + 1);
  localparam int LW  = 3 + 2 * SW + 3 * DW;
  localparam int EW  = 3 * IW + 3 * SW + 2 * FW;
  localparam int KW  = IW + SW;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cp_valid = 1'b0;
  logic [DW-1:0] cp_dest = '0;
  logic [LW-1:0] cp_msg = '0;
  logic slot_start, idle, err;
  logic [N-1:0] xb_valid;
  logic [N-1:0][LW-1:0] xb_msg;

  always #5 clk = ~clk;

  mc_router_top #(.N(N), .NS(NS), .NP(NP)) dut (.*);

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- peeks ----------------
  logic [KW-1:0]          pk_key;      // lookup address to read at every port
  logic [N-1:0][SW-1:0]   pk_taddr;    // tree address to read, per port
  logic [N-1:0]           pk_lk_valid;
  logic [N-1:0][SW-1:0]   pk_lk_sid;
  logic [N-1:0][EW-1:0]   pk_tree;
  logic [N-1:0]           pk_cur_v, pk_alloc, pk_release;
  logic [N-1:0][2:0]      pk_type, pk_outs;
  logic [N-1:0][SW-1:0]   pk_sid;

  for (genvar g = 0; g < N; g++) begin : g_peek
    assign pk_lk_valid[g] = dut.g_chip[g / NP].u_chip.g_mod[g % NP].u_port.u_mc.u_lookup.valid[pk_key];
    assign pk_lk_sid[g]   = dut.g_chip[g / NP].u_chip.g_mod[g % NP].u_port.u_mc.u_lookup.sid_mem[pk_key];
    assign pk_tree[g]     = dut.g_chip[g / NP].u_chip.g_mod[g % NP].u_port.u_mc.u_tree.mem[pk_taddr[g]];
    assign pk_cur_v[g]   = dut.g_chip[g / NP].u_chip.g_mod[g % NP].u_port.u_mc.cur_v;
    assign pk_type[g]    = 3'(dut.g_chip[g / NP].u_chip.g_mod[g % NP].u_port.u_mc.cur.mtype);
    assign pk_sid[g]     = dut.g_chip[g / NP].u_chip.g_mod[g % NP].u_port.u_mc.sid_r;
    assign pk_outs[g]    = dut.g_chip[g / NP].u_chip.g_mod[g % NP].u_port.u_mc.pr_out_v;
    assign pk_alloc[g]   = dut.g_chip[g / NP].u_chip.g_mod[g % NP].u_port.u_mc.pr_alloc;
    assign pk_release[g] = dut.g_chip[g / NP].u_chip.g_mod[g % NP].u_port.u_mc.pr_release;
  end

  // ---------------- reference model ----------------
  int root     [SESSIONS];
  int root_sid [SESSIONS];
  bit member   [SESSIONS][N];
  int par      [SESSIONS][N];
  int lch      [SESSIONS][N];
  int rch      [SESSIONS][N];
  int sidof    [SESSIONS][N];
  int fresh    [N];
  int stk      [N][$];
  int rev      [N][NS];      // session owning a port's tree-memory address, or -1
  int t1_q     [N][$];       // sessions of the CP allocate requests sent to a port
  int pending  [SESSIONS];   // messages of the session's operation still alive
  bit to_check [SESSIONS];

  int n_type [8];
  int n_root_create = 0, n_self_leave = 0, n_repl_leave = 0, n_add = 0;
  int n_overlap = 0, n_busy_skip = 0, n_invalid_skip = 0, n_ops_done = 0;

  function automatic int size_of(int s, int x);
    if (x < 0) return 0;
    return 1 + size_of(s, lch[s][x]) + size_of(s, rch[s][x]);
  endfunction

  function automatic int model_alloc(int p);
    if (stk[p].size() != 0) return stk[p].pop_back();
    fresh[p]++;
    return fresh[p] - 1;
  endfunction

  // tree shape only; the SIDs are filled in when the ports allocate them
  function automatic void model_add(int s, int p);
    int x;
    member[s][p] = 1;
    lch[s][p] = -1;
    rch[s][p] = -1;
    if (root[s] < 0) begin
      root[s] = p;
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
  endfunction

  function automatic logic [LW-1:0] pack(int t, int dsid, int did, int ssid, int sid_, int info);
    return {3'(t), SW'(dsid), DW'(did), SW'(ssid), DW'(sid_), DW'(info)};
  endfunction

  task automatic check_session(int s);
    pk_key = KW'((root[s] << SW) | root_sid[s]);
    for (int p = 0; p < N; p++) pk_taddr[p] = SW'(member[s][p] ? sidof[s][p] : 0);
    #1;
    for (int p = 0; p < N; p++) begin
      check(pk_lk_valid[p] == member[s][p],
            $sformatf("lookup valid s%0d p%0d exp %0d", s, p, member[s][p]));
      if (member[s][p]) begin
        logic [EW-1:0] e;
        int fr, fl;
        check(pk_lk_sid[p] == SW'(sidof[s][p]),
              $sformatf("lookup sid s%0d p%0d got %0d exp %0d", s, p, pk_lk_sid[p], sidof[s][p]));
        e  = pk_tree[p];
        fr = int'(e[EW-1 -: FW]);
        fl = int'(e[EW-FW-1 -: FW]);
        check(fl == size_of(s, lch[s][p]) && fr == size_of(s, rch[s][p]),
              $sformatf("fanouts s%0d p%0d got %0d/%0d exp %0d/%0d", s, p, fl, fr,
                        size_of(s, lch[s][p]), size_of(s, rch[s][p])));
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
  endtask

  // ---------------- completion monitor ----------------
  // Sampled at the clock edge that ends phase 3: the processed message, its
  // resolved SID and its outputs are all valid then.
  always @(posedge clk) begin
    if (rst_n && dut.phase == 3'd3) begin
      for (int p = 0; p < N; p++) begin
        if (pk_cur_v[p]) begin
          int s, sid;
          sid = int'(pk_sid[p]);
          if (pk_type[p] == 3'd1) begin
            s = (t1_q[p].size() != 0) ? t1_q[p].pop_front() : -1;
            check(s >= 0, $sformatf("allocate at p%0d with no request", p));
            if (s >= 0) begin
              int exp_sid;
              exp_sid = model_alloc(p);
              check(pk_alloc[p] && sid == exp_sid,
                    $sformatf("p%0d allocated SID %0d, expected %0d", p, sid, exp_sid));
              sidof[s][p] = sid;
              rev[p][sid] = s;
              if (root[s] == p && par[s][p] == p && pending[s] == 1) root_sid[s] = sid;
            end
          end else begin
            s = rev[p][sid];
            check(s >= 0, $sformatf("p%0d processed type %0d for free SID %0d", p, pk_type[p], sid));
          end
          if (s >= 0) begin
            if (pk_release[p]) begin
              stk[p].push_back(sid);
              rev[p][sid] = -1;
            end
            pending[s] += int'(pk_outs[p][0]) + int'(pk_outs[p][1]) + int'(pk_outs[p][2]) - 1;
            if (pending[s] == 0) to_check[s] <= 1'b1;
          end
        end
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && dut.phase == 3'd1)
      for (int p = 0; p < N; p++)
        if (xb_valid[p]) n_type[xb_msg[p][LW-1 -: 3]]++;
  end

  // ---------------- stimulus ----------------
  task automatic next_slot();
    @(negedge clk);
    while (!slot_start) @(negedge clk);
  endtask

  task automatic check_finished();
    for (int s = 0; s < SESSIONS; s++)
      if (to_check[s]) begin
        to_check[s] = 1'b0;
        n_ops_done++;
        check_session(s);
      end
  endtask

  task automatic reset_all();
    rst_n = 1'b0;
    cp_valid = 1'b0;
    for (int s = 0; s < SESSIONS; s++) begin
      root[s] = -1;
      root_sid[s] = 0;
      pending[s] = 0;
      to_check[s] = 1'b0;
      for (int p = 0; p < N; p++) begin
        member[s][p] = 0; lch[s][p] = -1; rch[s][p] = -1; par[s][p] = -1; sidof[s][p] = 0;
      end
    end
    for (int p = 0; p < N; p++) begin
      fresh[p] = 0;
      stk[p].delete();
      t1_q[p].delete();
      for (int k = 0; k < NS; k++) rev[p][k] = -1;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    pk_key = '0;
    pk_taddr = '0;
    for (int t = 0; t < 8; t++) n_type[t] = 0;

    for (int run = 0; run < RUNS; run++) begin
      int busy_sessions, waited;
      reset_all();
      for (int slot = 0; slot < SIM_SLOTS; slot++) begin
        bit add;
        int s, p;
        next_slot();
        check_finished();
        cp_valid = 1'b0;
        if ($urandom_range(1, 0) == 1) begin
          add = $urandom_range(1, 0) == 1;
          s   = $urandom_range(SESSIONS - 1, 0);
          p   = $urandom_range(N - 1, 0);
          if (pending[s] != 0) begin
            n_busy_skip++;
          end else if ((add && member[s][p]) ||
                       (!add && (!member[s][p] || root[s] == p))) begin
            n_invalid_skip++;
          end else begin
            busy_sessions = 0;
            foreach (pending[k]) if (pending[k] != 0) busy_sessions++;
            if (busy_sessions != 0) n_overlap++;
            cp_valid = 1'b1;
            pending[s] = 1;
            if (add) begin
              cp_dest = DW'(p + 1);
              if (root[s] < 0) begin
                cp_msg = pack(1, 0, p + 1, 0, p + 1, 0);
                n_root_create++;
              end else begin
                cp_msg = pack(1, 0, p + 1, root_sid[s], root[s] + 1, 0);
                n_add++;
              end
              t1_q[p].push_back(s);
              model_add(s, p);
            end else begin
              cp_dest = DW'(root[s] + 1);
              cp_msg  = pack(3, root_sid[s], root[s] + 1, root_sid[s], root[s] + 1, p + 1);
              model_remove(s, p);
            end
          end
        end
      end
      next_slot();
      cp_valid = 1'b0;
      // let the last operations finish
      waited = 0;
      while (!idle && waited < 2000) begin
        next_slot();
        check_finished();
        waited++;
      end
      next_slot();
      check_finished();
      check(idle, $sformatf("run %0d: router did not go idle", run));
      for (int s = 0; s < SESSIONS; s++) begin
        check(pending[s] == 0, $sformatf("run %0d: session %0d still has %0d messages", run, s, pending[s]));
        if (root[s] >= 0) check_session(s);
      end
      check(!err, $sformatf("run %0d: controller error flag raised", run));
    end

    for (int t = 2; t <= 7; t++)
      check(n_type[t] > 0, $sformatf("message type %0d never crossed the cross-bar", t));
    check(n_root_create > 0, "no session was created");
    check(n_add > 0, "no port was added below a root");
    check(n_self_leave > 0, "no leaving port was its own replacement");
    check(n_repl_leave > 0, "no leaving port was replaced");
    check(n_overlap > 0, "no two operations were in flight together");
    check(n_busy_skip > 0, "no request hit a busy session");
    check(n_ops_done > 0, "no operation was seen to finish");
    $display("workload N=%0d NS=%0d sessions=%0d: runs=%0d slots/run=%0d ops=%0d roots=%0d adds=%0d self_leave=%0d replaced=%0d overlap=%0d busy_skip=%0d invalid_skip=%0d types2..7=%0d,%0d,%0d,%0d,%0d,%0d",
             N, NS, SESSIONS, RUNS, SIM_SLOTS, n_ops_done, n_root_create, n_add, n_self_leave, n_repl_leave,
             n_overlap, n_busy_skip, n_invalid_skip, n_type[2], n_type[3], n_type[4],
             n_type[5], n_type[6], n_type[7]);
    done = 1'b1;
  end
endmodule
