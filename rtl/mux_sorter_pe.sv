// mux_sorter_pe: one processing element of the multiplexer-based sorter.
//
// The PE holds no state. Its own record arrives straight from the priority
// pool; a comparator checks it against the new record on the global input
// bus, and a control circuit uses its own comparator result and those of its
// two neighbours to steer a multiplexer that picks the PE's output:
//   pass  - its own record from the pool,
//   load  - the new record from the global input bus,
//   left  - the record of the PE to its left  (a shift toward higher rank),
//   right - the record of the PE to its right (a shift toward lower rank).
// Ranks rise from left to right; the rightmost PE holds the top rank.
//
// One slot of the array is being removed (rem = 1 in that PE; left_of_rem
// marks the PEs to its left). The removed slot reports "greater than the new
// key" to its neighbours, which is what the document's "feed the top PE with
// the maximum number" achieves when the removed slot is the top rank.
// gt = 1 means the stored key is strictly greater than the new key, so a new
// record is placed above stored records with an equal key.
//
// Comparator, control circuit and the pass / load / shift-from-left sources
// follow the document's PE. The fourth source (shift from the right) is this
// design's addition: it lets a slot below the new record's rank be deleted,
// which the manager needs when a cell arrives at an empty queue and that
// queue moves to the top rank.
//
// Purely combinational.
module mux_sorter_pe #(
  parameter int unsigned RW = 21,  // record width
  parameter int unsigned KW = 7    // key width: the top KW bits of a record
) (
  input  logic          en,          // 0: pass own record unchanged
  input  logic          rem,         // this slot is the one being removed
  input  logic          left_of_rem, // this slot lies left of the removed one
  input  logic [RW-1:0] own,         // record from the priority pool
  input  logic [RW-1:0] new_rec,     // record on the global input bus
  input  logic [RW-1:0] from_left,   // left neighbour's pool record
  input  logic [RW-1:0] from_right,  // right neighbour's pool record
  input  logic          gt_left,     // left neighbour's comparator result
  input  logic          gt_right,    // right neighbour's comparator result
  output logic          gt,          // to both neighbours
  output logic [RW-1:0] data_out
);

  typedef enum logic [1:0] {SEL_PASS, SEL_LOAD, SEL_LEFT, SEL_RIGHT} sel_e;
  sel_e sel;

  assign gt = rem | (own[RW-1 -: KW] > new_rec[RW-1 -: KW]);

  // control circuit
  always_comb begin
    if (!en) begin
      sel = SEL_PASS;
    end else if (rem) begin
      if (gt_left)       sel = SEL_LEFT;
      else if (gt_right) sel = SEL_LOAD;
      else               sel = SEL_RIGHT;
    end else if (left_of_rem) begin
      if (!gt)           sel = SEL_PASS;
      else if (!gt_left) sel = SEL_LOAD;
      else               sel = SEL_LEFT;
    end else begin
      if (gt)            sel = SEL_PASS;
      else if (gt_right) sel = SEL_LOAD;
      else               sel = SEL_RIGHT;
    end
  end

  // data routing multiplexer
  always_comb begin
    unique case (sel)
      SEL_PASS:  data_out = own;
      SEL_LOAD:  data_out = new_rec;
      SEL_LEFT:  data_out = from_left;
      SEL_RIGHT: data_out = from_right;
    endcase
  end

endmodule
