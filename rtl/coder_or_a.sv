// coder_or_a -- block A of one coder level: the wide OR that forms one output bit.
//
// Level i of the multi-level coder receives 2^(i+1) lines, numbered 0 .. 2^(i+1)-1.
// Output bit y(i) is 1 when any line whose number has a 1 in its top bit (bit i) is
// active, so block A is a single OR over the upper half of the level's lines,
// x(2^i) .. x(2^(i+1)-1), exactly as the original circuit draws the A elements.
// Taking only that upper half on the port is this design's choice; the lower half
// never reaches A anyway.
//
// Interface: x_hi[k] is level line 2^i + k; y is output bit y(i).
// Timing: purely combinational, one OR tree of 2^i inputs (depth log2(2^i) in
// 2-input gates), no clock and no reset.
module coder_or_a #(
  parameter int unsigned LEVEL = 3   // level number i; A has 2^i inputs (8 at level 3)
) (
  input  logic [2**LEVEL-1:0] x_hi,  // upper half of the level's lines
  output logic                y      // output code bit y(LEVEL)
);
  always_comb y = |x_hi;
endmodule
