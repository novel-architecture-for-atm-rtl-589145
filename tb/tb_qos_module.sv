// tb_qos_module: one cascadable module, driven directly, replaying the
// four-queue worked example (ds, dns, mc, OAM; costs 5, 10, 2, 1) on port 1
// of a two-port pool. The testbench plays the manager: it reads the port,
// closes the new-priority bus (new_rec_i = sub_rec_o), feeds the empty check
// and asks for the top slot to be removed. Checked at every step: the record
// on the output-stage bus, the subtractor's record and renormalisation
// request, and the written-back slice against the example's rank table (its
// priorities listed without the normalise bit). Every other step reads the
// port at the same edge as the previous write, exercising the forwarding
// register. Also checked: the arrival lookup (hit, position, record), a
// busy-queue cell count increment, and that in slave mode both bus drivers
// are off.
`timescale 1ns/1ps
module tb_qos_module;
  localparam int NPORTS = 2, NQ = 4, PW = 6, CW = 4, NW = 8, QW = 2;
  localparam int RW = 1 + PW + CW + QW + NW;

  typedef struct packed {
    logic          eflag;
    logic [PW-1:0] prio;
    logic [CW-1:0] cost;
    logic [QW-1:0] qid;
    logic [NW-1:0] cnt;
  } rec_t;
  typedef rec_t [NQ-1:0] entry_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic master, rd_en, s1_port_b, wr_en, load_en, sort_en, rem_here, rem_right, inc_en, norm, last;
  logic [0:0] rd_addr, s1_port;
  logic [QW-1:0] s1_qid, rem_pos, hit_pos_o;
  logic [NQ-1:0][RW-1:0] load_data, wr_data_o;
  logic [RW-1:0] new_rec_i, top_rec_o, sub_rec_o, hit_rec_o, d_left_o, d_right_o;
  logic [NW-1:0] cnt_next;
  logic sub_norm_o, sub_uflow_o, hit_o, gt_left_o, gt_right_o;

  qos_module #(.NPORTS(NPORTS), .NQ(NQ), .PW(PW), .CW(CW), .NW(NW), .QW(QW)) dut (
    .clk, .rst_n, .master, .rd_en, .rd_addr, .s1_port, .s1_qid, .wr_en, .load_en, .load_data,
    .sort_en, .rem_here, .rem_right, .rem_pos, .inc_en, .new_rec_i, .norm, .last, .cnt_next,
    .top_rec_o, .sub_rec_o, .sub_norm_o, .sub_uflow_o, .hit_o, .hit_pos_o, .hit_rec_o, .wr_data_o,
    .gt_left_i(1'b0), .d_left_i('0), .gt_right_i(1'b1), .d_right_i('0),
    .gt_left_o, .d_left_o, .gt_right_o, .d_right_o);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  localparam int DS = 0, DNS = 1, MC = 2, OAM = 3;
  int ex_cost [4] = '{5, 10, 2, 1};
  int tbl [10][4][3] = '{
    '{'{OAM,16,4}, '{MC,16,5},  '{DS,16,8},  '{DNS,16,9}},
    '{'{MC,16,5},  '{DS,16,8},  '{DNS,16,9}, '{OAM,15,3}},
    '{'{DS,16,8},  '{DNS,16,9}, '{OAM,15,3}, '{MC,14,4}},
    '{'{DNS,16,9}, '{OAM,15,3}, '{MC,14,4},  '{DS,11,7}},
    '{'{OAM,15,3}, '{MC,14,4},  '{DS,11,7},  '{DNS,6,8}},
    '{'{OAM,14,2}, '{MC,14,4},  '{DS,11,7},  '{DNS,6,8}},
    '{'{MC,14,4},  '{OAM,13,1}, '{DS,11,7},  '{DNS,6,8}},
    '{'{OAM,13,1}, '{MC,12,3},  '{DS,11,7},  '{DNS,6,8}},
    '{'{MC,12,3},  '{DS,11,7},  '{DNS,6,8},  '{OAM,13,0}},
    '{'{DS,11,7},  '{MC,10,2},  '{DNS,6,8},  '{OAM,13,0}}
  };

  function automatic entry_t row(int t);
    entry_t e;
    for (int r = 0; r < 4; r++) begin
      int q;
      q = tbl[t][r][0];
      e[NQ-1-r] = '{eflag: tbl[t][r][2] != 0, prio: PW'(tbl[t][r][1]), cost: CW'(ex_cost[q]),
                    qid: QW'(q), cnt: NW'(tbl[t][r][2])};
    end
    return e;
  endfunction

  function automatic entry_t no_nbit(entry_t e);
    for (int i = 0; i < NQ; i++) e[i].prio[PW-1] = 1'b0;
    return e;
  endfunction

  task automatic idle();
    rd_en = 0; wr_en = 0; load_en = 0; sort_en = 0; inc_en = 0; norm = 0; last = 0;
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rec_t top, sub;
    entry_t exp_e;
    bit rd_pending;
    idle();
    master = 1; rd_addr = 1; s1_port = 1; s1_qid = 0; rem_here = 1; rem_right = 0;
    rem_pos = 3; new_rec_i = '0; cnt_next = '0; load_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load T0 into port 1
    load_data = row(0); load_en = 1; wr_en = 1;
    @(negedge clk);
    idle();
    rd_pending = 0;
    for (int t = 1; t <= 9; t++) begin
      bit b2b;
      b2b = t[0];                    // next read at the same edge as this write
      if (!rd_pending) begin
        @(negedge clk);              // a gap: the read then comes from the pool
        rd_en = 1;
        @(negedge clk);
        idle();
      end
      // stage 1
      top = rec_t'(top_rec_o);
      top.prio[PW-1] = 1'b0;
      check(top == row(t-1)[NQ-1], $sformatf("T%0d output candidate %h", t-1, top));
      last = (top.cnt == 1);
      cnt_next = top.cnt - 1;
      #1;
      sub = rec_t'(sub_rec_o);
      new_rec_i = sub_rec_o;
      sort_en = 1; wr_en = 1; norm = sub_norm_o;
      check(sub_norm_o == (t == 4), $sformatf("renormalisation request at T%0d", t-1));
      check(!sub_uflow_o, "underflow");
      #1;
      check(no_nbit(wr_data_o) == row(t), $sformatf("slice after T%0d: %h exp %h", t-1, no_nbit(wr_data_o), row(t)));
      rd_en = b2b && t < 9;
      rd_pending = rd_en;
      @(negedge clk);
      idle();
    end
    // arrival lookup and busy-queue increment: dns (rank 3 in T9 -> index 1)
    @(negedge clk);
    rd_en = 1;
    @(negedge clk);
    idle();
    s1_qid = DNS;
    #1;
    sub = rec_t'(hit_rec_o);
    check(hit_o && hit_pos_o == 1 && sub.qid == DNS, "lookup of dns");
    inc_en = 1; wr_en = 1;
    #1;
    exp_e = row(9);
    exp_e[1].cnt = 9;
    check(no_nbit(wr_data_o) == exp_e, "busy arrival count");
    // slave mode: bus drivers off
    master = 0;
    #1;
    check(top_rec_o == '0 && sub_rec_o == '0 && !sub_norm_o, "slave drives the buses");
    @(negedge clk);
    idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
