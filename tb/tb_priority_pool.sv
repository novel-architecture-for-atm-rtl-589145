// tb_priority_pool: random writes and reads of the 16-entry pool against an
// array model. A read returns, one clock edge later, the entry as it was
// before any write at the same edge.
`timescale 1ns/1ps
module tb_priority_pool;
  localparam int NPORTS = 16, NQ = 4, PW = 6, CW = 4, NW = 8, QW = 2;
  localparam int RW = 1 + PW + CW + QW + NW;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en, wr_en;
  logic [3:0] rd_addr, wr_addr;
  logic [NQ-1:0][RW-1:0] rd_data, wr_data;
  logic [NQ-1:0][RW-1:0] model [NPORTS];
  int checks = 0, failures = 0;

  priority_pool #(.NPORTS(NPORTS), .NQ(NQ), .PW(PW), .CW(CW), .NW(NW)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NQ-1:0][RW-1:0] expd;
    bit pend;
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = '0; pend = 0;
    // fill every entry
    for (int p = 0; p < NPORTS; p++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 4'(p);
      for (int i = 0; i < NQ; i++) wr_data[i] = RW'($urandom);
      model[p] = wr_data;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rd_data != expd) begin
          failures++;
          if (failures < 10) $display("FAIL read %h exp %h", rd_data, expd);
        end
      end
      rd_en = $urandom_range(3) != 0; rd_addr = 4'($urandom);
      wr_en = $urandom_range(1); wr_addr = (n % 3 == 0) ? rd_addr : 4'($urandom);
      for (int i = 0; i < NQ; i++) wr_data[i] = RW'($urandom);
      pend = rd_en;
      if (rd_en) expd = model[rd_addr];
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
