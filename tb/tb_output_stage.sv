// tb_output_stage: random output requests and candidate records. Checks the
// combinational send / last / next-count outputs and that the registered
// cell output (valid, port, queue id) follows one clock edge later.
`timescale 1ns/1ps
module tb_output_stage;
  localparam int NPORTS = 16, NQ = 4, NW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic serve, cand_eflag, send, last, cell_valid;
  logic [3:0] port, cell_port;
  logic [1:0] cand_qid, cell_qid;
  logic [NW-1:0] cand_cnt, cnt_next;
  int checks = 0, failures = 0;

  output_stage #(.NPORTS(NPORTS), .NQ(NQ), .NW(NW)) dut (.*);

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ps; int pp, pq;
    serve = 0; cand_eflag = 0; port = 0; cand_qid = 0; cand_cnt = 0; ps = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      bit es;
      @(negedge clk);
      check(cell_valid == ps, "cell_valid");
      if (ps) check(cell_port == 4'(pp) && cell_qid == 2'(pq), "cell port/qid");
      serve = $urandom_range(1); cand_eflag = $urandom_range(3) != 0;
      port = 4'($urandom); cand_qid = 2'($urandom);
      cand_cnt = ($urandom_range(2) == 0) ? NW'(1) : NW'($urandom_range(4));
      #1;
      es = serve && cand_eflag && cand_cnt != 0;
      check(send == es, "send");
      check(last == (es && cand_cnt == 1), "last");
      check(cnt_next == (es ? cand_cnt - 1 : cand_cnt), "cnt_next");
      ps = es; pp = port; pq = cand_qid;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
