// tb_mc_router_table1: the functional workload at router sizes taken from the
// resource table of the design (ports N and sessions per port NS), to show
// that the control path works unchanged when it is scaled up.
//
// Each instance of mc_workload_env holds a complete router of the given size
// and runs the same random add/remove traffic as the 8 x 8 workload test
// (request probability 1/2 per slot, add/remove 1/2, uniform port and
// session), checking every session's tree after each operation.  The tree and
// lookup memories have their full sizes (NS entries, N x 2^clog2(NS) lookup
// words per port); the requests are drawn from SESSIONS sessions so that trees
// grow several levels deep within a short run.  The SID and message fields
// are as wide as at the full size.  The sizes run:
//   N = 16, NS = 8192, 1 port control module per device (16 devices)
//   N = 32, NS = 4096, 2 port control modules per device (16 devices)
// The instances run side by side; the result line sums their checks.
module tb_mc_router_table1;
  logic [1:0] done;
  int checks [2], failures [2];

  mc_workload_env #(.N(16), .NS(8192), .NP(1), .SESSIONS(48), .RUNS(20), .SIM_SLOTS(350))
    u_n16 (.done(done[0]), .checks(checks[0]), .failures(failures[0]));
  mc_workload_env #(.N(32), .NS(4096), .NP(2), .SESSIONS(48), .RUNS(20), .SIM_SLOTS(350))
    u_n32 (.done(done[1]), .checks(checks[1]), .failures(failures[1]));

  initial begin
    #1;  // the environments clear done at time 0
    wait (done === 2'b11);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1]);
    $finish;
  end

  // watchdog: 20 runs of at most 750 slots of six 10-unit cycles
  initial begin
    #(20 * 750 * 60 + 100000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end
endmodule
