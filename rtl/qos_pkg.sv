// qos_pkg: operation codes shared by the QoS manager and its testbenches.
//
// The QoS manager accepts one operation per clock cycle:
//   OP_SERVE  - an output request for a port: the highest-ranked non-empty
//               queue of that port sends one cell and is re-ranked.
//   OP_ARRIVE - a cell has been appended to one queue of a port; an empty
//               queue that receives a cell is moved to the top rank.
//   OP_LOAD   - (re)initialise the whole QoS entry of a port (costs, initial
//               priorities, queue ids, cell counts, already in rank order).
// OP_NONE is an idle slot. The encoding is this design's own choice.
package qos_pkg;

  typedef enum logic [1:0] {
    OP_NONE   = 2'd0,
    OP_SERVE  = 2'd1,
    OP_ARRIVE = 2'd2,
    OP_LOAD   = 2'd3
  } qos_op_e;

endpackage
