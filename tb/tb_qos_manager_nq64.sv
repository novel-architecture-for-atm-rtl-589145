// tb_qos_manager_nq64: the QoS manager with 64 delay QoSs per port, the
// largest number the single-cycle sort is rated for, in one module. Costs are
// 8 bits wide so 64 queues can have distinct costs; priorities are 10 bits.
// Runs the shared random test (qos_random_env).
`timescale 1ns/1ps
module tb_qos_manager_nq64;
  qos_random_env #(.NPORTS(16), .NQ(64), .PW(10), .CW(8), .NW(8), .KQ(1), .KP(1), .NOPS(20000)) env ();

  // backstop, far beyond the environment's own cycle watchdog
  initial begin : backstop
    #1s;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
