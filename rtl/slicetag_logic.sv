// slicetag_logic: slice membership and live-in masks at operand read.
//
// An instruction belongs to every slice that either of its source operands
// belongs to; a seed also belongs to the slice whose ID it was given at rename.
// The OR of the two source SliceTags (and, for a seed, of the slice ID) is the
// SliceTag of the instruction and of its destination operand. A source operand
// is a live-in of every slice that the other operand belongs to and it does
// not: live_left = tag_right & ~tag_left, and symmetrically for the right
// operand. This is the gate structure of the source's operand-read logic.
//
// Purely combinational; one instance serves one instruction per cycle. The
// single instance (the source's core reads operands of several instructions
// per cycle) and the in_slice flag are this design's choice.
module slicetag_logic
  import reslice_pkg::*;
(
  input  slicetag_t tag_left,    // SliceTag of the left source operand
  input  slicetag_t tag_right,   // SliceTag of the right source operand
  input  logic      is_seed,     // instruction was marked as a seed
  input  slicetag_t seed_id,     // one-hot slice ID assigned to the seed
  output slicetag_t inst_tag,    // SliceTag of the instruction and destination
  output slicetag_t live_left,   // slices for which the left operand is a live-in
  output slicetag_t live_right,  // slices for which the right operand is a live-in
  output logic      in_slice     // instruction belongs to at least one slice
);

  always_comb begin
    inst_tag   = tag_left | tag_right | (is_seed ? seed_id : '0);
    in_slice   = |inst_tag;
    live_left  = tag_right & ~tag_left;
    live_right = tag_left & ~tag_right;
  end

endmodule
