// tb_port_decoder: every port number of a 16-port system split over 4 module
// rows; the row select must be one-hot on row port/4 and the local address
// must be port mod 4. A 1-row decoder must always select row 0.
`timescale 1ns/1ps
module tb_port_decoder;
  logic [3:0] port;
  logic [3:0] row_sel;
  logic [1:0] local_port;
  logic [0:0] row1;
  logic [3:0] local1;
  int checks = 0, failures = 0;

  port_decoder #(.NPORTS(16), .NROWS(4)) dut  (.port, .row_sel, .local_port);
  port_decoder #(.NPORTS(16), .NROWS(1)) dut1 (.port, .row_sel(row1), .local_port(local1));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 16; p++) begin
      port = 4'(p);
      #1;
      checks += 2;
      if (row_sel != 4'(1 << (p / 4)) || local_port != 2'(p % 4)) begin
        failures++;
        $display("FAIL port %0d: row_sel %b local %0d", p, row_sel, local_port);
      end
      if (row1 != 1'b1 || local1 != 4'(p)) begin
        failures++;
        $display("FAIL 1-row port %0d", p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
