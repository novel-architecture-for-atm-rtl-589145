// mux_odi_sorter: single-cycle insertion sorter built from NQ stateless PEs.
//
// The NQ records of one port arrive in rank order straight from the priority
// pool (index 0 = lowest rank, index NQ-1 = highest rank, the output
// candidate). In one combinational pass the sorter removes the record at
// position rem_pos and inserts new_rec at the rank its key {eflag, prio}
// earns: every PE compares its record with new_rec on the global input bus
// and routes either its own record, the new record, or a neighbour's record
// to its output. No records are held in registers, so no load cycle is
// needed before the sort.
//
// For an output request rem_pos = NQ-1: the served candidate leaves the top
// slot and its aged record is inserted (the document's insert operation).
// With en = 0 the records pass unchanged.
//
// Cascading: the sorter is one slice of a longer chain. The comparator result
// and pool record of its leftmost and rightmost PEs go to the neighbouring
// slices, and theirs come in. A lone sorter (or the leftmost slice) ties
// gt_left_i to 0; a lone sorter (or the top slice, the master) ties
// gt_right_i to 1, which plays the part of the document's "maximum number fed
// to the top PE". The removed slot is either in this slice (rem_here, at
// rem_pos), in a slice further right (rem_right: every PE here lies left of
// it), or further left (both 0).
//
// Input records must be sorted (keys non-decreasing with index, across the
// whole chain); the output then is too. Pipeline registers can be put on the
// inputs or the outputs; this module has none.
module mux_odi_sorter #(
  parameter int unsigned NQ = 4,   // queues per port (PEs)
  parameter int unsigned RW = 21,  // record width
  parameter int unsigned KW = 7,   // key width (top bits of a record)
  localparam int unsigned QW = (NQ > 1) ? $clog2(NQ) : 1
) (
  input  logic                  en,
  input  logic                  rem_here,   // removed slot is in this slice
  input  logic                  rem_right,  // removed slot is in a slice to the right
  input  logic [QW-1:0]         rem_pos,    // its position, when rem_here
  input  logic [RW-1:0]         new_rec,
  input  logic [NQ-1:0][RW-1:0] data_in,
  output logic [NQ-1:0][RW-1:0] data_out,
  // cascade chain
  input  logic                  gt_left_i,  // from the left slice's rightmost PE
  input  logic [RW-1:0]         d_left_i,
  input  logic                  gt_right_i, // from the right slice's leftmost PE
  input  logic [RW-1:0]         d_right_i,
  output logic                  gt_left_o,  // leftmost PE, to the left slice
  output logic [RW-1:0]         d_left_o,
  output logic                  gt_right_o, // rightmost PE, to the right slice
  output logic [RW-1:0]         d_right_o
);

  logic [NQ-1:0] gt;
  logic [NQ+1:0] gt_ext;               // gt with the two boundary values
  logic [NQ+1:0][RW-1:0] d_ext;        // records with the two neighbours' records
  logic [NQ-1:0] rem_vec;              // one-hot: the removed slot
  logic [NQ-1:0] left_vec;             // thermometer: slots left of it

  always_comb begin
    gt_ext   = {gt_right_i, gt, gt_left_i};
    d_ext    = {d_right_i, data_in, d_left_i};
    rem_vec  = rem_here ? (NQ'(1) << rem_pos) : '0;
    left_vec = rem_here ? (rem_vec - NQ'(1)) : {NQ{rem_right}};
  end

  assign gt_left_o  = gt[0];
  assign d_left_o   = data_in[0];
  assign gt_right_o = gt[NQ-1];
  assign d_right_o  = data_in[NQ-1];

  for (genvar i = 0; i < NQ; i++) begin : g_pe
    mux_sorter_pe #(.RW(RW), .KW(KW)) u_pe (
      .en          (en),
      .rem         (rem_vec[i]),
      .left_of_rem (left_vec[i]),
      .own         (data_in[i]),
      .new_rec     (new_rec),
      .from_left   (d_ext[i]),
      .from_right  (d_ext[i+2]),
      .gt_left     (gt_ext[i]),
      .gt_right    (gt_ext[i+2]),
      .gt          (gt[i]),
      .data_out    (data_out[i])
    );
  end

endmodule
