// tb_mc_router_workload: the functional workload of the 8 x 8 router with up
// to 40 sessions: 50 runs of 350 time slots, a request with probability 1/2
// per slot, add or remove with probability 1/2, port and session uniform.
//
// The environment (mc_workload_env, at its default sizes) issues the requests,
// lets operations on different sessions overlap, and checks every session's
// tree in all lookup and tree memories each time one of its operations
// finishes, as well as the SIDs each port allocates.  This testbench adds the
// watchdog and prints the result line.
module tb_mc_router_workload;
  logic done;
  int   checks, failures;

  mc_workload_env u_env (.done, .checks, .failures);

  initial begin
    #1;  // the environment clears done at time 0
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: 50 runs of at most 750 slots of six 10-unit cycles
  initial begin
    #(50 * 750 * 60 + 100000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
