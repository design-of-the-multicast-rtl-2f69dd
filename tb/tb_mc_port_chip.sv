// tb_mc_port_chip: test of the port-control device, by building the 8 x 8
// router from four devices of two port control modules each
// (mc_router_top with NP = 2) and running the functional workload on it.
//
// With four devices, every CP message must be taken by exactly the device that
// holds its destination port (BASE offsets 0, 2, 4 and 6), the SGS chain must
// pass through both modules of each device and on to the next device, and
// the slot timers of the four devices must stay in step with the router's.
// A fault in any of these shows up as a wrong tree, a lost message (an
// operation that never finishes) or two messages for one cross-bar output (an
// assertion).  The environment (mc_workload_env) checks every session's tree
// in all memories after each operation: 10 runs of 350 slots, a request with
// probability 1/2 per slot, add or remove 1/2, port and session uniform.
module tb_mc_port_chip;
  logic done;
  int   checks, failures;

  mc_workload_env #(.N(8), .NS(40), .NP(2), .RUNS(10), .SIM_SLOTS(350))
    u_env (.done, .checks, .failures);

  initial begin
    #1;  // the environment clears done at time 0
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: 10 runs of at most 750 slots of six 10-unit cycles
  initial begin
    #(10 * 750 * 60 + 100000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
