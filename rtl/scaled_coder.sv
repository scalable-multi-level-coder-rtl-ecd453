// scaled_coder -- an existing N_BASE-bit multi-level coder widened by one output bit.
//
// The coder is made wider without touching it: one more conversion level, level
// N_BASE, is placed in front of its inputs. That level's block A ORs the upper half of
// the 2^(N_BASE+1) new inputs into the new top bit y(N_BASE); its block B folds input k
// with input k + 2^N_BASE into the existing coder's input k. The existing coder then
// encodes the low N_BASE bits exactly as before. The default builds the 5-bit,
// 32-input coder from the 4-bit, 16-input one.
//
// USE_X0 selects whether input 0 is carried: if the existing coder uses its input 0,
// the extra level must build element B(0) as well; if not, both leave it out. The same
// value is passed to both parts so that they always agree.
//
// Interface: x[k] is input line k (one-hot); y is its number; even_active is 1 when
// an even-numbered input is active and USE_X0 = 1, else 0 (see ml_coder).
// Timing: combinational; the extra level adds one 2-input OR in front of the existing
// coder's paths.
module scaled_coder #(
  parameter int unsigned N_BASE = 4,    // output bits of the existing coder
  parameter bit          USE_X0 = 1'b0  // 1: input 0 is carried by both parts
) (
  input  logic [2**(N_BASE+1)-1:0] x,       // unitary code, 2^(N_BASE+1) lines
  output logic [N_BASE:0]          y,       // N_BASE+1 bit number of the active line
  output logic                     even_active  // even-numbered input active (USE_X0 = 1)
);
  logic [2**N_BASE-1:0] base_x;   // inputs of the existing coder

  // Additional level N_BASE: forms y(N_BASE) and the existing coder's inputs.
  coder_level #(.LEVEL(N_BASE), .KEEP_B0(USE_X0)) u_extra_level (
    .x      (x),
    .y      (y[N_BASE]),
    .x_next (base_x)
  );

  // The existing coder, unchanged.
  ml_coder #(.N(N_BASE), .USE_X0(USE_X0)) u_base (
    .x      (base_x),
    .y      (y[N_BASE-1:0]),
    .even_active(even_active)
  );
endmodule
