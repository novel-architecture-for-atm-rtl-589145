// qos_random_env: parameterised random test of the QoS manager, shared by the
// testbenches that run it at other sizes and cascade arrangements.
//
// Every port is first loaded with a sorted entry (some queues empty, the rest
// holding a few cells, priority 2^(PW-2), random non-zero costs). Then NOPS
// random operations follow, one per cycle: output requests, cell arrivals,
// idle slots and occasional reloads (half of them with every queue empty),
// often to the port used just before so
// the back-to-back forwarding path is exercised. A reference model in this
// file (list deletion and insertion, renormalisation of non-empty records)
// predicts the cell output and the written-back entry of every operation,
// two cycles later. Mechanisms are counted; each must occur at least once.
// With KQ > 1 this includes insertions and wake-ups whose slot lies in a
// slave module, and with KP > 1 operations on every module row.
`timescale 1ns/1ps
module qos_random_env #(
  parameter int unsigned NPORTS = 16,
  parameter int unsigned NQ     = 4,
  parameter int unsigned PW     = 6,
  parameter int unsigned CW     = 4,
  parameter int unsigned NW     = 8,
  parameter int unsigned KQ     = 1,
  parameter int unsigned KP     = 1,
  parameter int unsigned NOPS   = 20000
);
  import qos_pkg::*;

  localparam int unsigned PAW = (NPORTS > 1) ? $clog2(NPORTS) : 1;
  localparam int unsigned QW  = (NQ > 1) ? $clog2(NQ) : 1;
  localparam int unsigned RW  = 1 + PW + CW + QW + NW;
  localparam int unsigned NQM = NQ / KQ;

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

  qos_manager #(.NPORTS(NPORTS), .NQ(NQ), .PW(PW), .CW(CW), .NW(NW), .KQ(KQ), .KP(KP)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  entry_t model [NPORTS];

  typedef struct {
    bit     snd;
    int     port;
    int     qid;
    bit     upd;
    entry_t data;
    bit     norm;
  } exp_t;

  int n_send, n_empty_port, n_last, n_norm, n_wake, n_busy_arrive,
      n_tie, n_fwd, n_load, n_slave_insert, n_slave_wake;
  int n_row [KP];

  function automatic logic [PW:0] key(rec_t r);
    return {r.eflag, r.prio};
  endfunction

  function automatic entry_t reinsert(entry_t e, int rem, rec_t nr, output bit tie, output int pos);
    rec_t lst[$];
    entry_t o;
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
    int pos;
    x.snd = 0; x.upd = 0; x.norm = 0; x.port = p; x.qid = 0;
    e = model[p];
    top = e[NQ-1];
    if (p == last_port) n_fwd++;
    if (o != OP_NONE) n_row[p / (NPORTS / KP)]++;
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
          e = reinsert(e, NQ-1, nr, tie, pos);
          if (tie) n_tie++;
          if (pos < NQ - NQM) n_slave_insert++;
          if (x.norm) begin e = normalise(e); n_norm++; end
          x.upd = 1; x.data = e; model[p] = e;
        end else n_empty_port++;
      end
      OP_ARRIVE: begin
        int at;
        at = 0;
        for (int i = 0; i < NQ; i++) if (e[i].qid == QW'(q)) at = i;
        if (!e[at].eflag) begin
          nr = e[at];
          nr.eflag = 1; nr.prio = top.prio; nr.cnt = nr.cnt + 1;
          x.norm = top.prio < PW'(nr.cost);
          e = reinsert(e, at, nr, tie, pos);
          if (x.norm) begin e = normalise(e); n_norm++; end
          if (at < NQ - NQM) n_slave_wake++;
          n_wake++;
        end else begin
          if (e[at].cnt != '1) e[at].cnt = e[at].cnt + 1;
          n_busy_arrive++;
        end
        x.upd = 1; x.data = e; model[p] = e;
      end
      default: ;
    endcase
    last_port = (o == OP_NONE || (o == OP_SERVE && !x.upd)) ? -1 : p;
    return x;
  endfunction

  exp_t exp_q [int];
  int cyc = 0;

  always @(negedge clk) begin
    if (rst_n) begin
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

  task automatic issue(qos_op_e o, int p, int q = 0, entry_t ld = '0);
    exp_t x;
    op_valid = (o != OP_NONE); op = o; op_port = PAW'(p); op_qid = QW'(q);
    load_data = ld;
    x = model_op(o, p, q, ld);
    if (o != OP_NONE) exp_q[cyc + 2] = x;
    @(negedge clk);
    op_valid = 0; op = OP_NONE;
  endtask

  // a sorted entry: queues with random costs, about a third of them empty
  // (all of them when all_empty is set)
  function automatic entry_t random_entry(bit all_empty = 0);
    rec_t lst [$];
    entry_t e;
    for (int i = 0; i < NQ; i++) begin
      rec_t r;
      r.qid   = QW'(i);
      r.cost  = CW'(1 + $urandom_range((1 << CW) - 2));
      r.prio  = PW'(1 << (PW - 2));
      r.eflag = !all_empty && ($urandom_range(2) != 0);
      r.cnt   = r.eflag ? NW'(1 + $urandom_range(3)) : '0;
      lst.push_back(r);
    end
    lst.sort() with (item.eflag);
    for (int i = 0; i < NQ; i++) e[i] = lst[i];
    return e;
  endfunction

  initial begin : watchdog
    repeat (NOPS * 2 + NPORTS * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op_valid = 0; op = OP_NONE; op_port = 0; op_qid = 0; load_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < NPORTS; p++) issue(OP_LOAD, p, 0, random_entry());
    for (int n = 0; n < NOPS; n++) begin
      int p, r;
      p = (($urandom_range(3) == 0) ? last_port : $urandom_range(NPORTS - 1));
      if (p < 0) p = 0;
      r = $urandom_range(99);
      if (r < 55)      issue(OP_SERVE, p);
      else if (r < 95) issue(OP_ARRIVE, p, $urandom_range(NQ - 1));
      else if (r < 98) issue(OP_NONE, p);
      else             issue(OP_LOAD, p, 0, random_entry($urandom_range(1)));
    end
    repeat (4) @(negedge clk);

    $display("mechanisms: send=%0d empty_port=%0d last_cell=%0d renorm=%0d wake=%0d busy_arrive=%0d tie=%0d forward=%0d load=%0d slave_insert=%0d slave_wake=%0d",
             n_send, n_empty_port, n_last, n_norm, n_wake, n_busy_arrive, n_tie, n_fwd, n_load,
             n_slave_insert, n_slave_wake);
    check(n_send > 0, "no cell sent");
    check(n_empty_port > 0, "no request to an empty port");
    check(n_last > 0, "no last-cell bypass");
    check(n_norm > 0, "no renormalisation");
    check(n_wake > 0, "no wake-up of an empty queue");
    check(n_busy_arrive > 0, "no arrival to a busy queue");
    check(n_tie > 0, "no equal-key insertion");
    check(n_fwd > 0, "no back-to-back forwarding");
    check(n_load > 0, "no entry load");
    if (KQ > 1) begin
      check(n_slave_insert > 0, "no insertion into a slave module");
      check(n_slave_wake > 0, "no wake-up from a slave module");
    end
    for (int r = 0; r < KP; r++) check(n_row[r] > 0, $sformatf("module row %0d never used", r));
    check(exp_q.size() == 0, "outputs still pending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
