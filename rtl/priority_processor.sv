// priority_processor: the subtractor that ages the priority of the queue that
// has just been served.
//
// The served queue's new priority is its old priority minus its cost, so
// every queue with a non-zero cost keeps losing priority while it is served
// and no queue can starve. Two special cases:
//   * empty check: when the output stage reports that the cell just sent was
//     the queue's last one (last = 1), the priority bypasses the subtractor
//     unchanged and the empty flag of the new record is cleared;
//   * renormalisation: when the new priority is smaller than the cost, the
//     next subtraction would underflow, so norm_req asks the normalise circuit
//     to set the MSB of every priority of this port.
// The subtraction, the bypass, the empty flag and the compare against the
// cost all follow the document. It does not say what happens if prio < cost
// on entry (the renormalisation rule is meant to prevent it); this design
// then clamps the result to zero and raises underflow, instead of wrapping.
//
// Purely combinational; it sits between the pool read register and the
// sorter's global input bus.
module priority_processor #(
  parameter int unsigned PW = 6,   // priority bits (P)
  parameter int unsigned CW = 4    // cost bits (q)
) (
  input  logic [PW-1:0] prio,      // priority of the output candidate
  input  logic [CW-1:0] cost,      // its cost (decrementor)
  input  logic          last,      // empty check: the cell sent was the last one
  output logic [PW-1:0] new_prio,  // value driven onto the sorter's input bus
  output logic          new_eflag, // empty flag of the re-inserted record
  output logic          norm_req,  // renormalise this port
  output logic          underflow  // prio < cost on entry (should never happen)
);

  logic [PW-1:0] cost_ext;
  assign cost_ext = PW'(cost);

  always_comb begin
    underflow = 1'b0;
    norm_req  = 1'b0;
    new_eflag = 1'b1;
    if (last) begin
      new_prio  = prio;
      new_eflag = 1'b0;
    end else if (prio < cost_ext) begin
      new_prio  = '0;
      underflow = 1'b1;
      norm_req  = 1'b1;
    end else begin
      new_prio = prio - cost_ext;
      norm_req = (new_prio < cost_ext);
    end
  end

  initial begin
    assert (CW <= PW - 2)
      else $error("cost must stay below 2^(PW-2): CW=%0d PW=%0d", CW, PW);
  end

endmodule
