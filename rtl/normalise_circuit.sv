// normalise_circuit: the renormalisation network between the sorter and the
// priority pool.
//
// When norm is asserted, the MSB (the normalise bit) of the priority value of
// every non-empty record of the port is set to 1; all other bits pass
// unchanged. The manager only asserts norm when every non-empty queue's
// priority is below 2^(PW-1), so setting the MSB adds the same offset to all
// of them and keeps their order. The rule and its place after the sorter
// follow the document, which sets the MSB of all records. Leaving empty
// records alone is this design's choice: an empty queue keeps a stale
// priority that may already have its MSB set, and raising only some of the
// empty records would break the rank order the sorter relies on. An empty
// queue's priority is never used: it takes the top priority when a cell
// arrives. The record layout (eflag, prio, cost, qid, cnt; see qos_rec.svh)
// is this design's own.
//
// Purely combinational.
module normalise_circuit #(
  parameter int unsigned NQ = 4,   // queues (delay QoSs) per port
  parameter int unsigned PW = 6,   // priority bits
  parameter int unsigned CW = 4,   // cost bits
  parameter int unsigned NW = 8,   // cell-count bits
  parameter int unsigned QW = (NQ > 1) ? $clog2(NQ) : 1, // queue-id bits
  localparam int unsigned RW = 1 + PW + CW + QW + NW
) (
  input  logic                   norm,      // normalise control
  input  logic [NQ-1:0][RW-1:0]  data_in,   // records in rank order
  output logic [NQ-1:0][RW-1:0]  data_out
);

  `include "qos_rec.svh"
  `QOS_REC_T

  always_comb begin
    for (int i = 0; i < NQ; i++) begin
      qos_rec_t r;
      r = qos_rec_t'(data_in[i]);
      if (norm && r.eflag) r.prio[PW-1] = 1'b1;
      data_out[i] = r;
    end
  end

endmodule
