// tb_qos_bandwidth: long-run service shares and worst-case waiting time of
// one port whose queues never run dry, at the manager's default size.
//
// The port holds the four queues of the worked example with costs 5, 10, 2
// and 1. After each output request the testbench queues a new cell in the
// queue just served, so every queue stays non-empty. With subtraction as the
// cost function, queue m should receive the share
//     (1/D_m) / sum_x (1/D_x)
// of the output requests (here 1/9, 1/18, 5/18 and 10/18), and between two
// services of queue m at most sum_{x != m} (2^P - 1)/D_x requests should go
// to other queues (P = 6). Both are checked over 9000 requests; the share
// must lie within 1% of the port's requests.
`timescale 1ns/1ps
module tb_qos_bandwidth;
  import qos_pkg::*;

  localparam int NQ = 4, PW = 6, CW = 4, NW = 8, QW = 2;
  localparam int RW = 1 + PW + CW + QW + NW;
  localparam int NREQ = 9000;

  typedef struct packed {
    logic          eflag;
    logic [PW-1:0] prio;
    logic [CW-1:0] cost;
    logic [QW-1:0] qid;
    logic [NW-1:0] cnt;
  } rec_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  op_valid;
  qos_op_e               op;
  logic [3:0]            op_port;
  logic [QW-1:0]         op_qid;
  logic [NQ-1:0][RW-1:0] load_data;
  logic                  cell_valid, upd_valid, norm_event, underflow_event;
  logic [3:0]            cell_port, upd_port;
  logic [QW-1:0]         cell_qid;
  logic [NQ-1:0][RW-1:0] upd_data;

  qos_manager dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  int cost [NQ] = '{5, 10, 2, 1};
  int served [NQ];
  int since  [NQ];   // requests to other queues since queue m was last served
  int worst  [NQ];
  int n_norm = 0;

  initial begin : watchdog
    repeat (NREQ * 6 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (norm_event) n_norm++;

  initial begin
    real inv_sum;
    op_valid = 0; op = OP_NONE; op_port = 3; op_qid = 0; load_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // rank order: equal priorities, any order is sorted
    for (int i = 0; i < NQ; i++)
      load_data[i] = rec_t'{eflag: 1'b1, prio: PW'(16), cost: CW'(cost[i]), qid: QW'(i), cnt: NW'(100)};
    op_valid = 1; op = OP_LOAD;
    @(negedge clk);
    for (int n = 0; n < NREQ; n++) begin
      int k, q;
      op_valid = 1; op = OP_SERVE;
      @(negedge clk);
      op_valid = 0; op = OP_NONE;
      k = 0;
      while (!cell_valid && k < 4) begin @(negedge clk); k++; end
      check(cell_valid && cell_port == 4'd3, "a cell for every request");
      q = cell_qid;
      served[q]++;
      for (int m = 0; m < NQ; m++) begin
        if (m == q) since[m] = 0;
        else begin
          since[m]++;
          if (since[m] > worst[m]) worst[m] = since[m];
        end
      end
      op_valid = 1; op = OP_ARRIVE; op_qid = QW'(q);   // keep the queue busy
      @(negedge clk);
      op_valid = 0; op = OP_NONE;
    end
    repeat (3) @(negedge clk);

    inv_sum = 0.0;
    for (int m = 0; m < NQ; m++) inv_sum += 1.0 / cost[m];
    for (int m = 0; m < NQ; m++) begin
      real share, expect_share, bound;
      share = real'(served[m]) / NREQ;
      expect_share = (1.0 / cost[m]) / inv_sum;
      bound = 0.0;
      for (int x = 0; x < NQ; x++) if (x != m) bound += ((2.0 ** PW) - 1.0) / cost[x];
      $display("queue %0d cost %0d: share %f (expected %f), longest wait %0d requests (bound %f)",
               m, cost[m], share, expect_share, worst[m], bound);
      check(share > expect_share - 0.01 && share < expect_share + 0.01,
            $sformatf("share of queue %0d", m));
      check(real'(worst[m]) <= bound, $sformatf("wait of queue %0d", m));
    end
    check(n_norm > 0, "no renormalisation during the run");
    check(!underflow_event, "underflow");
    $display("renormalisations: %0d", n_norm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
