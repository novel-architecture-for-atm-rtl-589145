// qos_module: one cascadable QoS management module.
//
// A module holds a priority pool, a subtractor, a slice of the sorter and the
// normalise circuit. On its own it serves NPORTS ports with NQ queues each.
// Several modules can be combined by the manager (qos_manager):
//   * more queues per port: modules sit side by side, each holding NQ of
//     the port's ranks, their sorter slices chained left to right; the
//     rightmost module holds the top ranks and is the master;
//   * more ports: rows of modules hold different ports, and a decoder makes
//     the row that owns the requested port the active one.
// Only a master drives the output-stage bus (its top-ranked record) and the
// new-priority bus (its subtractor's result); a slave's drivers are off, as
// with the tristate buffers the document draws, here zero so the manager can
// OR the buses together.
//
// Stage 0: rd_en/rd_addr read the port's slice from the pool (registered).
// Stage 1: the slice (or, for a back-to-back access to the same port, the
// slice written at the previous edge) drives the sorter; the manager supplies
// the new record, where the removed slot is, the normalise control and the
// write enable; the normalised sorter output is written back. A busy-queue
// arrival (inc_en) only adds a cell to the matching record.
//
// The master/slave gating, sorter chaining and shared buses follow the
// document's cascadable module. Signal-level details (zero-gated buses
// instead of tristates, the hit lookup for arrivals, forwarding) are this
// design's own.
module qos_module #(
  parameter int unsigned NPORTS = 16, // ports held in this module's pool
  parameter int unsigned NQ     = 4,  // ranks (queues) of each port held here
  parameter int unsigned PW     = 6,  // priority bits
  parameter int unsigned CW     = 4,  // cost bits
  parameter int unsigned NW     = 8,  // cell-count bits
  parameter int unsigned QW     = 2,  // queue-id bits (over the whole port)
  localparam int unsigned PAW = (NPORTS > 1) ? $clog2(NPORTS) : 1,
  localparam int unsigned PQ  = (NQ > 1) ? $clog2(NQ) : 1,
  localparam int unsigned RW  = 1 + PW + CW + QW + NW,
  localparam int unsigned KW  = 1 + PW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  master,     // master / slave control
  // stage 0
  input  logic                  rd_en,
  input  logic [PAW-1:0]        rd_addr,
  // stage 1 control
  input  logic [PAW-1:0]        s1_port,
  input  logic [QW-1:0]         s1_qid,     // queue looked up for an arrival
  input  logic                  wr_en,      // write this module's slice back
  input  logic                  load_en,    // write load_data instead
  input  logic [NQ-1:0][RW-1:0] load_data,
  input  logic                  sort_en,
  input  logic                  rem_here,
  input  logic                  rem_right,
  input  logic [PQ-1:0]         rem_pos,
  input  logic                  inc_en,     // busy-queue arrival in this module
  input  logic [RW-1:0]         new_rec_i,  // new priority value bus
  input  logic                  norm,       // normalise control
  input  logic                  last,       // empty check from the output stage
  input  logic [NW-1:0]         cnt_next,   // candidate's count after the send
  // stage 1 results
  output logic [RW-1:0]         top_rec_o,  // output-stage bus (master only)
  output logic [RW-1:0]         sub_rec_o,  // subtractor result (master only)
  output logic                  sub_norm_o,
  output logic                  sub_uflow_o,
  output logic                  hit_o,      // s1_qid found in this slice
  output logic [PQ-1:0]         hit_pos_o,
  output logic [RW-1:0]         hit_rec_o,
  output logic [NQ-1:0][RW-1:0] wr_data_o,  // slice as written back
  // sorter chain
  input  logic                  gt_left_i,
  input  logic [RW-1:0]         d_left_i,
  input  logic                  gt_right_i,
  input  logic [RW-1:0]         d_right_i,
  output logic                  gt_left_o,
  output logic [RW-1:0]         d_left_o,
  output logic                  gt_right_o,
  output logic [RW-1:0]         d_right_o
);

  `include "qos_rec.svh"
  `QOS_REC_T

  // ---------------- pool and forwarding ----------------
  logic [NQ-1:0][RW-1:0] rd_data, wr_data;

  priority_pool #(.NPORTS(NPORTS), .NQ(NQ), .PW(PW), .CW(CW), .NW(NW), .QW(QW)) u_pool (
    .clk     (clk),
    .rd_en   (rd_en),
    .rd_addr (rd_addr),
    .rd_data (rd_data),
    .wr_en   (wr_en),
    .wr_addr (s1_port),
    .wr_data (wr_data)
  );

  logic                  fw_valid;
  logic [PAW-1:0]        fw_port;
  logic [NQ-1:0][RW-1:0] fw_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fw_valid <= 1'b0;
      fw_port  <= '0;
    end else begin
      fw_valid <= wr_en;
      fw_port  <= s1_port;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) fw_data <= wr_data;
  end

  logic [NQ-1:0][RW-1:0] entry;
  qos_rec_t              top;
  assign entry = (fw_valid && fw_port == s1_port) ? fw_data : rd_data;
  assign top   = qos_rec_t'(entry[NQ-1]);

  // ---------------- subtractor, enabled in master mode ----------------
  logic [PW-1:0] sub_prio;
  logic          sub_eflag, sub_norm, sub_uflow;

  priority_processor #(.PW(PW), .CW(CW)) u_sub (
    .prio      (top.prio),
    .cost      (top.cost),
    .last      (last),
    .new_prio  (sub_prio),
    .new_eflag (sub_eflag),
    .norm_req  (sub_norm),
    .underflow (sub_uflow)
  );

  always_comb begin
    qos_rec_t s;
    s = '{eflag: sub_eflag, prio: sub_prio, cost: top.cost, qid: top.qid, cnt: cnt_next};
    top_rec_o   = master ? RW'(top) : '0;
    sub_rec_o   = master ? RW'(s)   : '0;
    sub_norm_o  = master && sub_norm;
    sub_uflow_o = master && sub_uflow;
  end

  // ---------------- arrival lookup ----------------
  always_comb begin
    qos_rec_t r;
    hit_o     = 1'b0;
    hit_pos_o = '0;
    for (int i = 0; i < NQ; i++) begin
      r = qos_rec_t'(entry[i]);
      if (r.qid == s1_qid) begin
        hit_o     = 1'b1;
        hit_pos_o = PQ'(i);
      end
    end
    hit_rec_o = entry[hit_pos_o];
  end

  // busy-queue arrival: count the cell in place (saturating)
  logic [NQ-1:0][RW-1:0] sort_in;
  always_comb begin
    qos_rec_t r;
    r       = qos_rec_t'(hit_rec_o);
    sort_in = entry;
    if (inc_en) begin
      if (r.cnt != '1) r.cnt = r.cnt + NW'(1);
      sort_in[hit_pos_o] = r;
    end
  end

  // ---------------- sorter slice and normalise circuit ----------------
  logic [NQ-1:0][RW-1:0] sort_out, norm_out;

  mux_odi_sorter #(.NQ(NQ), .RW(RW), .KW(KW)) u_sorter (
    .en         (sort_en),
    .rem_here   (rem_here),
    .rem_right  (rem_right),
    .rem_pos    (rem_pos),
    .new_rec    (new_rec_i),
    .data_in    (sort_in),
    .data_out   (sort_out),
    .gt_left_i  (gt_left_i),
    .d_left_i   (d_left_i),
    .gt_right_i (gt_right_i),
    .d_right_i  (d_right_i),
    .gt_left_o  (gt_left_o),
    .d_left_o   (d_left_o),
    .gt_right_o (gt_right_o),
    .d_right_o  (d_right_o)
  );

  normalise_circuit #(.NQ(NQ), .PW(PW), .CW(CW), .NW(NW), .QW(QW)) u_norm (
    .norm     (norm),
    .data_in  (sort_out),
    .data_out (norm_out)
  );

  assign wr_data   = load_en ? load_data : norm_out;
  assign wr_data_o = wr_data;

endmodule
