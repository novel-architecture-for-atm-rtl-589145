// qos_rec.svh: the per-queue record held in the priority pool and routed
// through the sorter. It must be expanded inside a module that has the
// parameters PW (priority bits), CW (cost bits), QW (queue-id bits) and
// NW (cell-count bits).
//
// Field order, MSB first:
//   eflag - empty flag: 1 = the queue holds cells, 0 = the queue is empty.
//           It is the most significant bit of the sort key, so every
//           non-empty queue outranks every empty one.
//   prio  - PW-bit priority value; its MSB is the normalise bit.
//   cost  - CW-bit cost subtracted from prio each time the queue is served.
//   qid   - which QoS queue of the port this record describes.
//   cnt   - number of cells waiting in the queue.
// The sort key is {eflag, prio}: the top 1+PW bits of the record.
`ifndef QOS_REC_SVH
`define QOS_REC_SVH
`define QOS_REC_T \
  typedef struct packed { \
    logic          eflag; \
    logic [PW-1:0] prio; \
    logic [CW-1:0] cost; \
    logic [QW-1:0] qid; \
    logic [NW-1:0] cnt; \
  } qos_rec_t;
`endif
