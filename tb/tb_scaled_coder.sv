// tb_scaled_coder -- end-to-end test of the 32-input, 5-bit coder at its default size.
//
// The 16-input coder widened by one extra level is driven with every one-hot word
// (inputs 0 .. 31), the all-zero word and random multi-hot words. The reference needs
// no knowledge of the levels: for a one-hot word y is the number of the active input,
// for any word it is the bitwise OR of the numbers of all active inputs. The default
// build leaves out the B(0) elements, so input 0 and "no input" both give 0 and
// even_active stays 0.
//
// The test also counts how often each part of the scaled coder was exercised: every
// output bit set, an input handled only by the extra level (16 .. 31, y(4) = 1), an
// input passed through the extra level's folding into the existing coder (1 .. 15),
// input 0, the all-zero word and a multi-hot word. A part never exercised is counted
// as a failure. Stimulus on the rising edge, checks on the falling edge of a
// testbench clock; a watchdog bounds the run.
module tb_scaled_coder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [31:0] x;
  logic [4:0]  y;
  logic        even_active;

  scaled_coder dut (.x(x), .y(y), .even_active(even_active));

  int n_bit_set [5];
  int n_upper = 0, n_lower = 0, n_input0 = 0, n_idle = 0, n_multi = 0;

  function automatic logic [4:0] or_of_indices(input logic [31:0] v);
    logic [4:0] r = '0;
    for (int k = 0; k < 32; k++) if (v[k]) r |= 5'(k);
    return r;
  endfunction

  task automatic apply(input logic [31:0] v);
    @(posedge clk);
    x = v;
    @(negedge clk);
    checks++;
    if (y !== or_of_indices(v) || even_active !== 1'b0) begin
      failures++;
      $display("FAIL x=%h y=%0d (exp %0d) even_active=%b", v, y, or_of_indices(v), even_active);
    end
    for (int b = 0; b < 5; b++) if (y[b]) n_bit_set[b]++;
    if ($countones(v) == 0) n_idle++;
    else if ($countones(v) > 1) n_multi++;
    else if (v[0]) n_input0++;
    else if (|v[31:16]) n_upper++;
    else n_lower++;
  endtask

  task automatic require(input string what, input int count);
    checks++;
    $display("covered %-28s %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL %s never exercised", what);
    end
  endtask

  initial begin
    x = '0;
    foreach (n_bit_set[b]) n_bit_set[b] = 0;
    apply('0);
    for (int k = 0; k < 32; k++) apply(32'(1) << k);
    for (int r = 0; r < 200; r++) apply($urandom);
    for (int b = 0; b < 5; b++) require($sformatf("output bit y(%0d) set", b), n_bit_set[b]);
    require("input in extra level (16..31)", n_upper);
    require("input in base coder (1..15)", n_lower);
    require("input 0", n_input0);
    require("no input active", n_idle);
    require("multi-hot word", n_multi);
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
