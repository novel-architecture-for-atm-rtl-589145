// qos_manager: a QoS scheduler shared by all output ports of an ATM switch.
//
// Every output port owns NQ cell queues, one per delay QoS. Each queue has a
// priority value and a cost. When a port may send a cell, the non-empty queue
// with the highest priority sends it, and its priority then drops by its cost.
// A queue with a small cost loses priority slowly and is served often; since
// every cost is above zero, every queue's turn comes (no starvation). Over a
// long run queue m gets the share (1/D_m) / sum_x(1/D_x) of the port, where
// D is the cost.
//
// The manager is built from cascadable modules (qos_module), each with a
// priority pool, subtractor, sorter slice and normalise circuit. In the
// default configuration (KQ = KP = 1) a single module in master mode serves
// every port. KQ > 1 splits each port's ranks over KQ modules whose sorter
// slices are chained (more QoSs per port; the rightmost module is the
// master). KP > 1 splits the ports over KP rows of modules; a port decoder
// makes the row that owns the requested port active (more ports). The output
// stage, the operation pipeline and the bus control are shared.
//
// Datapath (two pipeline stages, one operation accepted every cycle):
//   stage 0  the operation's port addresses the priority pool; the port's
//            records, kept in rank order, are registered at the pool output.
//   stage 1  output stage: sends the top-ranked queue's cell and checks
//            whether it was the last one;
//            priority processor: subtracts the cost (or bypasses when the
//            queue went empty, clearing its empty flag);
//            multiplexer-based sorter: drops the served record from the top
//            slot and inserts the aged record at its new rank, in one pass;
//            normalise circuit: sets every priority MSB of the port when the
//            new priority fell below its cost;
//            the result is written back to the pool.
// A request for the port written back in the previous cycle takes the
// written entry from a forwarding register instead of the stale pool read.
//
// Operations (qos_pkg::qos_op_e):
//   OP_SERVE  op_port             output request
//   OP_ARRIVE op_port, op_qid     a cell was queued; an empty queue takes the
//                                 top rank's priority and moves to the top
//   OP_LOAD   op_port, load_data  write a port's whole entry (rank order,
//                                 index NQ-1 = top rank)
// Timing: an operation sampled at clock edge k produces cell_valid/cell_port/
// cell_qid and upd_* (the entry written back) after edge k+1, so the latency
// is two cycles and the rate is one output request per cycle.
//
// Follows the document: pool, subtractor, empty flag above the priority in the
// sort key, renormalisation by setting the MSB, single-cycle mux-based
// sorter, moving a newly non-empty queue to the top rank with a copy of the
// top priority. This design's own choices: port and operation encoding, the
// cell counter used for the empty check, the read/write pool with forwarding,
// the renormalisation check when a queue copies the top priority, the tie
// rule (an inserted record goes above stored records with an equal key), and
// normalising only non-empty records.
module qos_manager
  import qos_pkg::*;
#(
  parameter int unsigned NPORTS = 16, // output ports sharing the manager
  parameter int unsigned NQ     = 4,  // delay QoSs (queues) per port
  parameter int unsigned PW     = 6,  // priority value bits (P)
  parameter int unsigned CW     = 4,  // cost bits (q), CW <= PW-2
  parameter int unsigned NW     = 8,  // cell-count bits per queue
  parameter int unsigned KQ     = 1,  // cascaded modules per port (divides NQ)
  parameter int unsigned KP     = 1,  // module rows, power of two (divides NPORTS)
  localparam int unsigned PAW  = (NPORTS > 1) ? $clog2(NPORTS) : 1,
  localparam int unsigned QW   = (NQ > 1) ? $clog2(NQ) : 1,
  localparam int unsigned RW   = 1 + PW + CW + QW + NW,
  localparam int unsigned NQM  = NQ / KQ,       // ranks per module
  localparam int unsigned PQ   = (NQM > 1) ? $clog2(NQM) : 1,
  localparam int unsigned NPM  = NPORTS / KP,   // ports per module
  localparam int unsigned LPAW = (NPM > 1) ? $clog2(NPM) : 1,
  localparam int unsigned KQW  = (KQ > 1) ? $clog2(KQ) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // operation input, one per cycle
  input  logic                  op_valid,
  input  qos_op_e               op,
  input  logic [PAW-1:0]        op_port,
  input  logic [QW-1:0]         op_qid,
  input  logic [NQ-1:0][RW-1:0] load_data,
  // cell output
  output logic                  cell_valid,
  output logic [PAW-1:0]        cell_port,
  output logic [QW-1:0]         cell_qid,
  // new QoS data of the port, as written back to the pool
  output logic                  upd_valid,
  output logic [PAW-1:0]        upd_port,
  output logic [NQ-1:0][RW-1:0] upd_data,
  output logic                  norm_event,     // the update renormalised the port
  output logic                  underflow_event // a priority was below its cost
);

  `include "qos_rec.svh"
  `QOS_REC_T

  // ---------------- stage 0: operation register, row decode -------------
  logic                  s1_valid;
  qos_op_e               s1_op;
  logic [PAW-1:0]        s1_port;
  logic [QW-1:0]         s1_qid;
  logic [NQ-1:0][RW-1:0] s1_load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_op    <= OP_NONE;
      s1_port  <= '0;
      s1_qid   <= '0;
    end else begin
      s1_valid <= op_valid && (op != OP_NONE);
      s1_op    <= op;
      s1_port  <= op_port;
      s1_qid   <= op_qid;
    end
  end

  always_ff @(posedge clk) begin
    if (op_valid && op == OP_LOAD) s1_load <= load_data;
  end

  logic [KP-1:0]   rd_row, s1_row;
  logic [LPAW-1:0] rd_local, s1_local;

  port_decoder #(.NPORTS(NPORTS), .NROWS(KP)) u_dec_rd (
    .port (op_port), .row_sel (rd_row), .local_port (rd_local));
  port_decoder #(.NPORTS(NPORTS), .NROWS(KP)) u_dec_s1 (
    .port (s1_port), .row_sel (s1_row), .local_port (s1_local));

  // ---------------- module array ----------------
  logic [RW-1:0]          top_rec   [KP][KQ];
  logic [RW-1:0]          sub_rec   [KP][KQ];
  logic                   sub_norm  [KP][KQ];
  logic                   sub_uflow [KP][KQ];
  logic                   hit       [KP][KQ];
  logic [PQ-1:0]          hit_pos   [KP][KQ];
  logic [RW-1:0]          hit_rec   [KP][KQ];
  logic [NQM-1:0][RW-1:0] mod_wr    [KP][KQ];
  logic                   gt_lo     [KP][KQ];
  logic                   gt_ro     [KP][KQ];
  logic [RW-1:0]          d_lo      [KP][KQ];
  logic [RW-1:0]          d_ro      [KP][KQ];

  // shared stage-1 control, decided below
  logic          is_serve, is_arrive, is_load;
  logic          send, last;
  logic [NW-1:0] cnt_next;
  logic          wr_any, sort_en, norm;
  logic [RW-1:0] new_rec;
  logic [KQ-1:0] rem_here, rem_right, inc_en;
  logic [PQ-1:0] rem_pos;

  for (genvar r = 0; r < KP; r++) begin : g_row
    for (genvar k = 0; k < KQ; k++) begin : g_mod
      qos_module #(.NPORTS(NPM), .NQ(NQM), .PW(PW), .CW(CW), .NW(NW), .QW(QW)) u_mod (
        .clk         (clk),
        .rst_n       (rst_n),
        .master      (s1_row[r] && (k == KQ - 1)),
        .rd_en       (op_valid && rd_row[r]),
        .rd_addr     (rd_local),
        .s1_port     (s1_local),
        .s1_qid      (s1_qid),
        .wr_en       (wr_any && s1_row[r]),
        .load_en     (is_load),
        .load_data   (s1_load[k*NQM +: NQM]),
        .sort_en     (sort_en),
        .rem_here    (rem_here[k]),
        .rem_right   (rem_right[k]),
        .rem_pos     (rem_pos),
        .inc_en      (inc_en[k] && s1_row[r]),
        .new_rec_i   (new_rec),
        .norm        (norm),
        .last        (last),
        .cnt_next    (cnt_next),
        .top_rec_o   (top_rec[r][k]),
        .sub_rec_o   (sub_rec[r][k]),
        .sub_norm_o  (sub_norm[r][k]),
        .sub_uflow_o (sub_uflow[r][k]),
        .hit_o       (hit[r][k]),
        .hit_pos_o   (hit_pos[r][k]),
        .hit_rec_o   (hit_rec[r][k]),
        .wr_data_o   (mod_wr[r][k]),
        .gt_left_i   ((k == 0) ? 1'b0 : gt_ro[r][(k == 0) ? 0 : k - 1]),
        .d_left_i    ((k == 0) ? '0   : d_ro[r][(k == 0) ? 0 : k - 1]),
        .gt_right_i  ((k == KQ - 1) ? 1'b1 : gt_lo[r][(k == KQ - 1) ? k : k + 1]),
        .d_right_i   ((k == KQ - 1) ? '0   : d_lo[r][(k == KQ - 1) ? k : k + 1]),
        .gt_left_o   (gt_lo[r][k]),
        .d_left_o    (d_lo[r][k]),
        .gt_right_o  (gt_ro[r][k]),
        .d_right_o   (d_ro[r][k])
      );
    end
  end

  // ---------------- shared buses (only the master drives) ----------------
  qos_rec_t cand, sub_bus, arr_rec;
  logic     sub_norm_bus, sub_uflow_bus;
  logic     arr_hit;
  logic [KQW-1:0] arr_mod;
  logic [PQ-1:0]  arr_pos;

  always_comb begin
    logic [RW-1:0] c, sb, ar;
    c = '0; sb = '0; ar = '0;
    sub_norm_bus = 1'b0; sub_uflow_bus = 1'b0;
    arr_hit = 1'b0; arr_mod = '0; arr_pos = '0;
    for (int r = 0; r < KP; r++) begin
      for (int k = 0; k < KQ; k++) begin
        c             = c  | top_rec[r][k];
        sb            = sb | sub_rec[r][k];
        sub_norm_bus  = sub_norm_bus  | sub_norm[r][k];
        sub_uflow_bus = sub_uflow_bus | sub_uflow[r][k];
        if (s1_row[r] && hit[r][k]) begin
          arr_hit = 1'b1;
          arr_mod = KQW'(k);
          arr_pos = hit_pos[r][k];
          ar      = hit_rec[r][k];
        end
      end
    end
    cand    = qos_rec_t'(c);
    sub_bus = qos_rec_t'(sb);
    arr_rec = qos_rec_t'(ar);
  end

  assign is_serve  = s1_valid && s1_op == OP_SERVE;
  assign is_arrive = s1_valid && s1_op == OP_ARRIVE;
  assign is_load   = s1_valid && s1_op == OP_LOAD;

  // output stage and empty check
  output_stage #(.NPORTS(NPORTS), .NQ(NQ), .NW(NW)) u_out (
    .clk        (clk),
    .rst_n      (rst_n),
    .serve      (is_serve),
    .port       (s1_port),
    .cand_eflag (cand.eflag),
    .cand_qid   (cand.qid),
    .cand_cnt   (cand.cnt),
    .send       (send),
    .last       (last),
    .cnt_next   (cnt_next),
    .cell_valid (cell_valid),
    .cell_port  (cell_port),
    .cell_qid   (cell_qid)
  );

  // ---------------- stage-1 control ----------------
  logic arr_wake;   // arrival at an empty queue: move it to the top rank
  assign arr_wake = is_arrive && arr_hit && !arr_rec.eflag;

  always_comb begin
    qos_rec_t w;
    w = '{eflag: 1'b1, prio: cand.prio, cost: arr_rec.cost,
          qid: arr_rec.qid, cnt: arr_rec.cnt + NW'(1)};
    sort_en   = 1'b0;
    norm      = 1'b0;
    new_rec   = sub_bus;
    rem_pos   = PQ'(NQM - 1);
    inc_en    = '0;
    for (int k = 0; k < KQ; k++) begin
      rem_here[k]  = (k == KQ - 1);
      rem_right[k] = (k <  KQ - 1);
    end
    if (is_serve && send) begin
      // served candidate leaves the master's top slot
      sort_en = 1'b1;
      norm    = sub_norm_bus;
    end else if (arr_wake) begin
      sort_en = 1'b1;
      new_rec = w;
      norm    = (cand.prio < PW'(arr_rec.cost));
      rem_pos = arr_pos;
      for (int k = 0; k < KQ; k++) begin
        rem_here[k]  = (KQW'(k) == arr_mod);
        rem_right[k] = (KQW'(k) <  arr_mod);
      end
    end else if (is_arrive && arr_hit) begin
      for (int k = 0; k < KQ; k++) inc_en[k] = (KQW'(k) == arr_mod);
    end
  end

  assign wr_any = is_load || (is_serve && send) || (is_arrive && arr_hit);

  // new QoS data of the port: the selected row's slices, side by side
  logic [NQ-1:0][RW-1:0] wr_port;
  always_comb begin
    wr_port = '0;
    for (int r = 0; r < KP; r++)
      if (s1_row[r])
        for (int k = 0; k < KQ; k++)
          wr_port[k*NQM +: NQM] = mod_wr[r][k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd_valid       <= 1'b0;
      upd_port        <= '0;
      norm_event      <= 1'b0;
      underflow_event <= 1'b0;
    end else begin
      upd_valid       <= wr_any;
      upd_port        <= s1_port;
      norm_event      <= wr_any && !is_load && norm;
      underflow_event <= is_serve && send && sub_uflow_bus;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_any) upd_data <= wr_port;
  end

  // an arrival must name a queue that exists in the port's entry
  a_arrive_hits: assert property (@(posedge clk) disable iff (!rst_n)
    is_arrive |-> arr_hit);

  initial begin
    assert (NQ % KQ == 0 && NPORTS % KP == 0)
      else $error("KQ must divide NQ and KP must divide NPORTS");
  end

endmodule
