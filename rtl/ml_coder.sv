// ml_coder -- multi-level coder: 2^N-line unitary code in, N-bit binary number out.
//
// Instead of one wide OR per output bit (output bit j = OR of every input whose number
// has bit j set, 2^(N-1) inputs each), the coder is a chain of N-1 levels, numbered
// N-1 down to 1. Level i sees 2^(i+1) lines; it makes output bit y(i) with one OR over
// its upper half and folds its lines in half (line k OR line k + 2^i) for level i-1.
// Level 1 sees four lines: y(1) = line3 | line2, and its folded line 1 is y(0).
// The lines of level i are the coder inputs grouped by the low i+1 bits of their
// numbers, so levels 1 .. i-1 by themselves form an i-bit coder; the chain is built
// here with a generate loop over the same coder_level module.
//
// Input 0 encodes to all zeros and needs no gate. With USE_X0 = 0 (the design's main
// form) the B(0) element of every level is left out and x[0] is unused. With
// USE_X0 = 1 every level keeps B(0), and level 1's folded line 0 comes out as
// even_active: the OR of all even-numbered inputs. Together with y(0) (the OR of all
// odd-numbered inputs) it tells input 0 apart from no input at all:
// any input active = even_active | y[0]. even_active is 0 when USE_X0 = 0.
//
// For a one-hot x, y is the number of the active line; for any x, y is the bitwise OR
// of the numbers of all active lines (each output bit is an OR of inputs).
// Timing: combinational. The longest path runs through the level chain: y(0) passes
// N-1 two-input ORs.
module ml_coder #(
  parameter int unsigned N      = 4,    // output bits; 2^N inputs
  parameter bit          USE_X0 = 1'b0  // 1: carry input 0 through the levels
) (
  input  logic [2**N-1:0] x,       // unitary code, x[k] = input line k
  output logic [N-1:0]    y,       // positional binary number of the active line
  output logic            even_active  // an even-numbered input is active (USE_X0 = 1)
);
  // All level lines on one bus: the 2^(i+1) lines entering level i sit at
  // net[2^(i+2)-1 : 2^(i+1)], so the coder inputs occupy the top 2^N bits and
  // level 1's folded output (the "level 0" lines) sits at net[3:2].
  logic [2**(N+1)-1:2] net;

  if (N < 2) begin : g_bad_n
    $error("ml_coder: N must be at least 2");
  end

  assign net[2**(N+1)-1:2**N] = x;

  for (genvar i = N - 1; i >= 1; i--) begin : g_level
    coder_level #(.LEVEL(i), .KEEP_B0(USE_X0)) u_level (
      .x      (net[2**(i+2)-1:2**(i+1)]),
      .y      (y[i]),
      .x_next (net[2**(i+1)-1:2**i])
    );
  end

  assign y[0]   = net[3];
  assign even_active = net[2];
endmodule
