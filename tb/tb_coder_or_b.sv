// tb_coder_or_b -- self-checking test of block B (the 2-input ORs that fold a level).
//
// Level 3 is instantiated twice, without element B(0) (the default) and with it, and
// driven with every one-hot word, the all-zero word and random words. The expected
// next-level lines are computed bit by bit: line k is the OR of inputs k and k+8,
// and line 0 is 0 when B(0) is not built. Stimulus on the rising edge of a testbench
// clock, checks on the falling edge; a watchdog bounds the run.
module tb_coder_or_b;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] x;
  logic [7:0]  xn_nob0, xn_b0;

  coder_or_b #(.LEVEL(3))                 dut_nob0 (.x(x), .x_next(xn_nob0));
  coder_or_b #(.LEVEL(3), .KEEP_B0(1'b1)) dut_b0   (.x(x), .x_next(xn_b0));

  function automatic logic [7:0] fold(input logic [15:0] v, input bit keep0);
    logic [7:0] r;
    for (int k = 0; k < 8; k++) r[k] = v[k] | v[k+8];
    if (!keep0) r[0] = 1'b0;
    return r;
  endfunction

  task automatic apply(input logic [15:0] v);
    @(posedge clk);
    x = v;
    @(negedge clk);
    checks += 2;
    if (xn_nob0 !== fold(v, 1'b0)) begin
      failures++;
      $display("FAIL no-B0 x=%h x_next=%b", v, xn_nob0);
    end
    if (xn_b0 !== fold(v, 1'b1)) begin
      failures++;
      $display("FAIL B0 x=%h x_next=%b", v, xn_b0);
    end
  endtask

  initial begin
    x = '0;
    apply('0);
    for (int k = 0; k < 16; k++) apply(16'(1) << k);
    for (int r = 0; r < 200; r++) apply(16'($urandom));
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
