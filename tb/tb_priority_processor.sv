// tb_priority_processor: exhaustive test of the subtractor at 6-bit priority
// and 4-bit cost. For every priority, cost and empty-check value it checks the
// new priority (old - cost, or unchanged when the queue went empty), the empty
// flag, the renormalisation request (new priority below the cost) and the
// underflow flag (priority below the cost on entry, result clamped to 0).
`timescale 1ns/1ps
module tb_priority_processor;
  localparam int PW = 6, CW = 4;
  logic [PW-1:0] prio, new_prio;
  logic [CW-1:0] cost;
  logic last, new_eflag, norm_req, underflow;
  int checks = 0, failures = 0;

  priority_processor #(.PW(PW), .CW(CW)) dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 64; p++)
      for (int c = 0; c < 16; c++)
        for (int l = 0; l < 2; l++) begin
          int ep; bit ee, en, eu;
          prio = PW'(p); cost = CW'(c); last = l[0];
          #1;
          if (l) begin ep = p; ee = 0; en = 0; eu = 0; end
          else if (p < c) begin ep = 0; ee = 1; en = 1; eu = 1; end
          else begin ep = p - c; ee = 1; en = (ep < c); eu = 0; end
          checks++;
          if (new_prio != PW'(ep) || new_eflag != ee || norm_req != en || underflow != eu) begin
            failures++;
            if (failures < 10)
              $display("FAIL p=%0d c=%0d last=%0d: got %0d/%0b/%0b/%0b exp %0d/%0b/%0b/%0b",
                       p, c, l, new_prio, new_eflag, norm_req, underflow, ep, ee, en, eu);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
