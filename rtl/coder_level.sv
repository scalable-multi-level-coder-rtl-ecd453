// coder_level -- one conversion level i of the multi-level coder.
//
// A level takes 2^(i+1) lines of a unitary (one-hot) code and does two things:
//   * block A ORs the upper half of the lines into output bit y(i), the bit that
//     says whether the active line lies in the upper half;
//   * block B ORs line k with line k + 2^i, giving the 2^i lines of level i-1.
// The lines it passes down are a one-hot code again, numbered by the low i bits of
// the active input's number, so the level below repeats the same step. The same
// module serves as every level inside the coder and as the extra level that widens
// an existing coder by one output bit; nothing in the existing coder changes.
// At level 1 the passed-down line 1 is itself output bit y(0).
//
// Interface: x[k] is line k of level i; y is y(i); x_next[k] is line k of level i-1.
// KEEP_B0 decides whether element B(0), which only carries input number 0, is built.
// Timing: combinational; y has the depth of a 2^i-input OR, x_next one OR gate.
module coder_level #(
  parameter int unsigned LEVEL   = 3,    // level number i (>= 1)
  parameter bit          KEEP_B0 = 1'b0  // 1: build B(0) and carry input 0 downwards
) (
  input  logic [2**(LEVEL+1)-1:0] x,      // lines of this level
  output logic                    y,      // output bit y(LEVEL)
  output logic [2**LEVEL-1:0]     x_next  // lines of the next lower level
);
  coder_or_a #(.LEVEL(LEVEL)) u_a (
    .x_hi (x[2**(LEVEL+1)-1:2**LEVEL]),
    .y    (y)
  );

  coder_or_b #(.LEVEL(LEVEL), .KEEP_B0(KEEP_B0)) u_b (
    .x      (x),
    .x_next (x_next)
  );
endmodule
