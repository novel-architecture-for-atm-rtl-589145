// tb_normalise_circuit: random records through the normalise network. With
// norm = 0 every record must pass unchanged; with norm = 1 exactly the
// priority MSB of every non-empty record must be set.
`timescale 1ns/1ps
module tb_normalise_circuit;
  localparam int NQ = 4, PW = 6, CW = 4, NW = 8, QW = 2;
  localparam int RW = 1 + PW + CW + QW + NW;
  logic norm;
  logic [NQ-1:0][RW-1:0] data_in, data_out, exp_out;
  int checks = 0, failures = 0;

  normalise_circuit #(.NQ(NQ), .PW(PW), .CW(CW), .NW(NW)) dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < NQ; i++) data_in[i] = RW'($urandom);
      norm = n[0];
      #1;
      exp_out = data_in;
      // the MSB of the record is the empty flag; the next bit is the priority MSB
      if (norm) for (int i = 0; i < NQ; i++) if (data_in[i][RW-1]) exp_out[i][RW-2] = 1'b1;
      checks++;
      if (data_out != exp_out) begin
        failures++;
        if (failures < 10) $display("FAIL in=%h norm=%0b out=%h exp=%h", data_in, norm, data_out, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
