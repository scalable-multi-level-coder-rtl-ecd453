// coder_or_b -- block B of one coder level: the 2-input ORs that fold the level's
// lines in half for the next lower level.
//
// Level i receives 2^(i+1) lines. Line k and line k + 2^i differ only in bit i of
// their numbers; once bit i has been taken care of by block A, the two can share one
// line at level i-1. Element B(k) therefore forms
//     x_next[k] = x[k] | x[k + 2^i],   k = 0 .. 2^i - 1.
// Element B(0) only serves input number 0, which encodes to all zeros and never sets
// an output bit. The design drops it unless the coder has to carry input 0 through
// (KEEP_B0 = 1); when dropped, x_next[0] is driven 0 so that the port width stays
// regular and x[0], x[2^i] are left unused.
//
// Interface: x is the level's lines, x_next the 2^i lines of the next level.
// Timing: combinational, one 2-input OR deep; no clock and no reset.
module coder_or_b #(
  parameter int unsigned LEVEL   = 3,    // level number i
  parameter bit          KEEP_B0 = 1'b0  // 1: build element B(0) (input 0 is carried)
) (
  input  logic [2**(LEVEL+1)-1:0] x,      // the level's 2^(i+1) lines
  output logic [2**LEVEL-1:0]     x_next  // lines of level i-1
);
  localparam int unsigned HALF = 2**LEVEL;

  always_comb begin
    for (int unsigned k = 0; k < HALF; k++) begin
      if (k == 0 && !KEEP_B0) x_next[k] = 1'b0;
      else                    x_next[k] = x[k] | x[k+HALF];
    end
  end
endmodule
