// tb_ml_coder -- self-checking test of the multi-level coder.
//
// The 16-input, 4-bit coder (default, input 0 not carried) and an 8-input, 3-bit coder
// that carries input 0 are driven with every one-hot word, the all-zero word and
// random multi-hot words. The reference is independent of the level structure: for a
// one-hot word it is the number of the active line; for any word it is the bitwise OR
// of the numbers of all active lines, since every output bit is an OR of inputs.
// even_active must follow input 0 in the coder that carries it and stay 0 in the other.
// Stimulus on the rising edge, checks on the falling edge of a testbench clock; a
// watchdog bounds the run.
module tb_ml_coder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] xa;  logic [3:0] ya;  logic za;
  logic [7:0]  xb;  logic [2:0] yb;  logic zb;

  ml_coder                           dut_a (.x(xa), .y(ya), .even_active(za));
  ml_coder #(.N(3), .USE_X0(1'b1))   dut_b (.x(xb), .y(yb), .even_active(zb));

  function automatic logic [3:0] or_of_indices(input logic [15:0] v);
    logic [3:0] r = '0;
    for (int k = 0; k < 16; k++) if (v[k]) r |= 4'(k);
    return r;
  endfunction

  task automatic apply(input logic [15:0] v);
    @(posedge clk);
    xa = v;
    xb = v[7:0];
    @(negedge clk);
    checks += 2;
    if (ya !== or_of_indices(v) || za !== 1'b0) begin
      failures++;
      $display("FAIL N=4 x=%h y=%0d (exp %0d) even_active=%b", v, ya, or_of_indices(v), za);
    end
    if ({1'b0, yb} !== or_of_indices({8'h00, v[7:0]}) || zb !== (|(v[7:0] & 8'h55))) begin
      failures++;
      $display("FAIL N=3 x=%h y=%0d (exp %0d) even_active=%b", v[7:0], yb,
               or_of_indices({8'h00, v[7:0]}), zb);
    end
  endtask

  initial begin
    xa = '0; xb = '0;
    apply('0);
    for (int k = 0; k < 16; k++) apply(16'(1) << k);
    for (int r = 0; r < 300; r++) apply(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
