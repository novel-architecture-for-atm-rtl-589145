// tb_qos_manager: end-to-end test of the QoS manager at its default size
// (16 ports, 4 queues per port, 6-bit priorities, 4-bit costs).
//
// Part 1 replays the four-queue worked example: queues ds, dns, mc and OAM
// with costs 5, 10, 2, 1, cell counts 8, 9, 5, 4 and initial priority 16.
// After every output request the written-back entry is compared with the
// expected rank table (T1..T9; the table lists priorities without the
// normalise bit, which is set once, when dns falls to 6), and the served queues must come out in the
// order OAM, mc, ds, dns, OAM, OAM, mc, OAM, mc.
// Part 2 checks the rate and latency: requests for eight ports in eight
// consecutive cycles give eight cells in eight consecutive cycles, each two
// cycles after its request.
// Part 3 runs a long random mix of output requests, cell arrivals and entry
// loads on all ports and compares every cycle's outputs with a reference
// model kept in this testbench (a list insertion, not a PE array).
// Each mechanism (cell sent, empty port, last cell with subtractor bypass,
// renormalisation, wake-up of an empty queue, arrival to a busy queue, equal
// key insertion, back-to-back forwarding, entry load) is counted and must
// occur at least once.
`timescale 1ns/1ps
module tb_qos_manager;
  import qos_pkg::*;

  localparam int unsigned NPORTS = 16;
  localparam int unsigned NQ  = 4;
  localparam int unsigned PW  = 6;
  localparam int unsigned CW  = 4;
  localparam int unsigned NW  = 8;
  localparam int unsigned PAW = 4;
  localparam int unsigned QW  = 2;
  localparam int unsigned RW  = 1 + PW + CW + QW + NW;

  typedef struct packed {
    logic          eflag;
    logic [PW-1:0] prio;
    logic [CW-1:0] cost;
    logic [QW-1:0] qid;
    logic [NW-1:0] cnt;
  } rec_t;

  typedef rec_t [NQ-1:0] entry_t;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                  op_valid;
  qos_op_e               op;
  logic [PAW-1:0]        op_port;
  logic [QW-1:0]         op_qid;
  logic [NQ-1:0][RW-1:0] load_data;
  logic                  cell_valid;
  logic [PAW-1:0]        cell_port;
  logic [QW-1:0]         cell_qid;
  logic                  upd_valid;
  logic [PAW-1:0]        upd_port;
  logic [NQ-1:0][RW-1:0] upd_data;
  logic                  norm_event, underflow_event;

  qos_manager dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- reference model ----------------
  entry_t model [NPORTS];

  typedef struct {
    bit            snd;
    int            port;
    int            qid;
    bit            upd;
    entry_t        data;
    bit            norm;
  } exp_t;

  // mechanism counters
  int n_send, n_empty_port, n_last, n_norm, n_wake, n_busy_arrive,
      n_tie, n_fwd, n_load;

  function automatic logic [PW:0] key(rec_t r);
    return {r.eflag, r.prio};
  endfunction

  // remove slot rem of e, insert nr above every record whose key is <= its own
  function automatic entry_t reinsert(entry_t e, int rem, rec_t nr, output bit tie);
    rec_t lst[$];
    entry_t o;
    int pos;
    tie = 0;
    for (int i = 0; i < NQ; i++) if (i != rem) lst.push_back(e[i]);
    pos = 0;
    foreach (lst[i]) begin
      if (key(lst[i]) <= key(nr)) pos = i + 1;
      if (key(lst[i]) == key(nr)) tie = 1;
    end
    lst.insert(pos, nr);
    for (int i = 0; i < NQ; i++) o[i] = lst[i];
    return o;
  endfunction

  function automatic entry_t normalise(entry_t e);
    for (int i = 0; i < NQ; i++) if (e[i].eflag) e[i].prio[PW-1] = 1'b1;
    return e;
  endfunction

  int last_port = -1;

  function automatic exp_t model_op(qos_op_e o, int p, int q, entry_t ld);
    exp_t x;
    entry_t e;
    rec_t top, nr;
    bit tie;
    x.snd = 0; x.upd = 0; x.norm = 0; x.port = p; x.qid = 0;
    e = model[p];
    top = e[NQ-1];
    if (p == last_port) n_fwd++;
    case (o)
      OP_LOAD: begin
        x.upd = 1; x.data = ld; model[p] = ld; n_load++;
      end
      OP_SERVE: begin
        if (top.eflag && top.cnt != 0) begin
          x.snd = 1; x.qid = top.qid; n_send++;
          nr = top;
          nr.cnt = top.cnt - 1;
          if (top.cnt == 1) begin
            nr.eflag = 0; n_last++;
          end else begin
            nr.prio = top.prio - PW'(top.cost);
            x.norm = nr.prio < PW'(top.cost);
          end
          e = reinsert(e, NQ-1, nr, tie);
          if (tie) n_tie++;
          if (x.norm) begin e = normalise(e); n_norm++; end
          x.upd = 1; x.data = e; model[p] = e;
        end else n_empty_port++;
      end
      OP_ARRIVE: begin
        int pos;
        pos = -1;
        for (int i = 0; i < NQ; i++) if (e[i].qid == QW'(q)) pos = i;
        if (!e[pos].eflag) begin
          nr = e[pos];
          nr.eflag = 1; nr.prio = top.prio; nr.cnt = nr.cnt + 1;
          x.norm = top.prio < PW'(nr.cost);
          e = reinsert(e, pos, nr, tie);
          if (x.norm) begin e = normalise(e); n_norm++; end
          n_wake++;
        end else begin
          if (e[pos].cnt != '1) e[pos].cnt = e[pos].cnt + 1;
          n_busy_arrive++;
        end
        x.upd = 1; x.data = e; model[p] = e;
      end
      default: ;
    endcase
    last_port = (o == OP_NONE || (o == OP_SERVE && !x.upd)) ? -1 : p;
    return x;
  endfunction

  // expected outputs, by the cycle they are due
  exp_t exp_q [int];
  int cyc = 0;
  int cell_cycles [$];   // cycles in which a cell came out

  always @(negedge clk) begin
    if (rst_n) begin
      if (cell_valid) cell_cycles.push_back(cyc);
      if (exp_q.exists(cyc)) begin
        exp_t x;
        x = exp_q[cyc];
        check(cell_valid == x.snd, $sformatf("cell_valid=%0b exp %0b cyc %0d", cell_valid, x.snd, cyc));
        if (x.snd) check(cell_port == PAW'(x.port) && cell_qid == QW'(x.qid),
                          $sformatf("cell port/qid %0d/%0d exp %0d/%0d", cell_port, cell_qid, x.port, x.qid));
        check(upd_valid == x.upd, $sformatf("upd_valid=%0b exp %0b cyc %0d", upd_valid, x.upd, cyc));
        if (x.upd) check(upd_port == PAW'(x.port) && upd_data == x.data,
                         $sformatf("entry of port %0d: %h exp %h", x.port, upd_data, x.data));
        if (x.upd) check(norm_event == x.norm, "norm_event");
        check(!underflow_event, "underflow");
        exp_q.delete(cyc);
      end else begin
        check(!cell_valid && !upd_valid, $sformatf("unexpected output cyc %0d", cyc));
      end
      cyc++;
    end
  end

  // drive one operation in the current cycle (called just after a negedge)
  task automatic issue(qos_op_e o, int p, int q = 0, entry_t ld = '0);
    exp_t x;
    op_valid = (o != OP_NONE); op = o; op_port = PAW'(p); op_qid = QW'(q);
    load_data = ld;
    x = model_op(o, p, q, ld);
    if (o != OP_NONE) exp_q[cyc + 2] = x;
    @(negedge clk);
    op_valid = 0; op = OP_NONE;
  endtask

  function automatic rec_t mk(int eflag, int prio, int cost, int qid, int cnt);
    rec_t r;
    r.eflag = 1'(eflag); r.prio = PW'(prio); r.cost = CW'(cost);
    r.qid = QW'(qid); r.cnt = NW'(cnt);
    return r;
  endfunction

  // worked example: qids ds=0, dns=1, mc=2, OAM=3; index 3 is rank 1
  localparam int DS = 0, DNS = 1, MC = 2, OAM = 3;
  int ex_cost [4] = '{5, 10, 2, 1};
  // expected table rows, rank 1 first: {qid, prio, cells}
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

  function automatic entry_t tbl_entry(int t);
    entry_t e;
    for (int r = 0; r < 4; r++) begin
      int q;
      q = tbl[t][r][0];
      e[NQ-1-r] = mk(tbl[t][r][2] != 0, tbl[t][r][1], ex_cost[q], q, tbl[t][r][2]);
    end
    return e;
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the example's table lists priorities without the normalise bit
  function automatic entry_t no_nbit(entry_t e);
    for (int i = 0; i < NQ; i++) e[i].prio[PW-1] = 1'b0;
    return e;
  endfunction

  int n_table_norm = 0;
  always @(negedge clk) if (norm_event && upd_port == 5 && cyc < 40) n_table_norm++;

  int order [9] = '{OAM, MC, DS, DNS, OAM, OAM, MC, OAM, MC};

  initial begin
    op_valid = 0; op = OP_NONE; op_port = 0; op_qid = 0; load_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- part 1: the worked example on port 5 ----
    issue(OP_LOAD, 5, 0, tbl_entry(0));
    for (int t = 1; t <= 9; t++) begin
      entry_t prev_e;
      prev_e = model[5];
      issue(OP_SERVE, 5);
      repeat (2) @(negedge clk);   // let it retire prev_e the next request
      check(no_nbit(model[5]) == tbl_entry(t), $sformatf("model row T%0d", t));
      check(no_nbit(upd_data) == tbl_entry(t),
            $sformatf("entry after T%0d: %h exp %h", t - 1, no_nbit(upd_data), tbl_entry(t)));
      check(prev_e[NQ-1].qid == QW'(order[t-1]), $sformatf("served queue T%0d", t - 1));
    end

    // dns drops from 16 to 6, below its cost 10: the example renormalises once
    check(n_table_norm == 1, $sformatf("%0d renormalisations in the example", n_table_norm));

    // ---- part 2: rate and latency ----
    for (int p = 0; p < 8; p++) begin
      entry_t e;
      for (int i = 0; i < NQ; i++) e[i] = mk(1, 20 + i, 1 + i, i, 3);
      issue(OP_LOAD, 8 + (p % 8), 0, e);
    end
    repeat (3) @(negedge clk);
    begin
      int first_req;
      cell_cycles.delete();
      first_req = cyc;
      for (int p = 0; p < 8; p++) issue(OP_SERVE, 8 + p);
      repeat (4) @(negedge clk);
      check(cell_cycles.size() == 8, $sformatf("8 requests gave %0d cells", cell_cycles.size()));
      if (cell_cycles.size() == 8) begin
        check(cell_cycles[0] - first_req == 2,
              $sformatf("latency %0d cycles, expected 2", cell_cycles[0] - first_req));
        check(cell_cycles[7] - cell_cycles[0] == 7, "one cell per cycle");
      end
    end

    // ---- part 3: random mix on all ports ----
    for (int p = 0; p < NPORTS; p++) begin
      entry_t e;
      for (int i = 0; i < NQ; i++)
        e[i] = (i < 2) ? mk(0, 16, 1 + $urandom_range(14), i, 0)
                       : mk(1, 16, 1 + $urandom_range(14), i, 1 + $urandom_range(3));
      issue(OP_LOAD, p, 0, e);
    end
    for (int n = 0; n < 20000; n++) begin
      int p, r;
      p = (($urandom_range(3) == 0) ? last_port : $urandom_range(NPORTS - 1));
      if (p < 0) p = 0;
      r = $urandom_range(99);
      if (r < 55)      issue(OP_SERVE, p);
      else if (r < 95) issue(OP_ARRIVE, p, $urandom_range(NQ - 1));
      else if (r < 97) issue(OP_NONE, p);
      else begin
        entry_t e;
        for (int i = 0; i < NQ; i++) e[i] = mk(0, 16, 1 + $urandom_range(14), i, 0);
        issue(OP_LOAD, p, 0, e);
      end
    end
    repeat (4) @(negedge clk);

    $display("mechanisms: send=%0d empty_port=%0d last_cell=%0d renorm=%0d wake=%0d busy_arrive=%0d tie=%0d forward=%0d load=%0d",
             n_send, n_empty_port, n_last, n_norm, n_wake, n_busy_arrive, n_tie, n_fwd, n_load);
    check(n_send > 0, "no cell sent");
    check(n_empty_port > 0, "no request to an empty port");
    check(n_last > 0, "no last-cell bypass");
    check(n_norm > 0, "no renormalisation");
    check(n_wake > 0, "no wake-up of an empty queue");
    check(n_busy_arrive > 0, "no arrival to a busy queue");
    check(n_tie > 0, "no equal-key insertion");
    check(n_fwd > 0, "no back-to-back forwarding");
    check(n_load > 0, "no entry load");
    check(exp_q.size() == 0, "outputs still pending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
