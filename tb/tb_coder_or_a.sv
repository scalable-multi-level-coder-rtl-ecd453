// tb_coder_or_a -- self-checking test of block A (the wide OR of a level's upper half).
//
// Two instances, level 3 (8-input OR, the default) and level 1 (2-input OR), are driven
// with every possible input word. The expected output is worked out by scanning the
// word bit by bit. Stimulus is applied on the rising edge of a testbench clock and
// checked on the falling edge; the block is combinational, so its output must be
// valid within that half period. A watchdog ends the run with a failure if the
// sequence does not finish.
module tb_coder_or_a;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0] x3;
  logic       y3;
  logic [1:0] x1;
  logic       y1;

  coder_or_a #(.LEVEL(3)) dut3 (.x_hi(x3), .y(y3));
  coder_or_a #(.LEVEL(1)) dut1 (.x_hi(x1), .y(y1));

  function automatic logic any_set(input logic [7:0] v, input int unsigned w);
    logic r = 1'b0;
    for (int unsigned b = 0; b < w; b++) if (v[b] == 1'b1) r = 1'b1;
    return r;
  endfunction

  initial begin
    x3 = '0; x1 = '0;
    for (int unsigned v = 0; v < 256; v++) begin
      @(posedge clk);
      x3 = 8'(v);
      x1 = 2'(v);
      @(negedge clk);
      checks++;
      if (y3 !== any_set(8'(v), 8)) begin
        failures++;
        $display("FAIL level3 x_hi=%b y=%b", x3, y3);
      end
      if (v < 4) begin
        checks++;
        if (y1 !== any_set(8'(v), 2)) begin
          failures++;
          $display("FAIL level1 x_hi=%b y=%b", x1, y1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
