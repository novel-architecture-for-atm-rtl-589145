// tb_qos_cascade: the QoS manager built as a 2 x 2 array of cascaded modules:
// each port's 8 queues are split over two modules whose sorter slices are
// chained (the right one is the master), and the 16 ports are split over two
// module rows selected by the port decoder. Runs the shared random test
// (qos_random_env) against its reference model.
`timescale 1ns/1ps
module tb_qos_cascade;
  qos_random_env #(.NPORTS(16), .NQ(8), .PW(6), .CW(4), .NW(8), .KQ(2), .KP(2), .NOPS(20000)) env ();

  // backstop, far beyond the environment's own cycle watchdog
  initial begin : backstop
    #1s;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
