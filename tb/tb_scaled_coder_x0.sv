// tb_scaled_coder_x0 -- the scaled 32-input coder built to carry input 0.
//
// With USE_X0 = 1 both the extra level and the existing coder build their B(0)
// elements, and even_active is the OR of all even-numbered inputs. The test drives
// every one-hot word, the all-zero word and random words and checks y (bitwise OR of
// the active inputs' numbers) and even_active. It also checks the property that makes
// B(0) worth building: even_active | y(0) is 1 for every one-hot word, input 0
// included, and 0 for the all-zero word, so input 0 can be told apart from no input.
// Stimulus on the rising edge, checks on the falling edge; a watchdog bounds the run.
module tb_scaled_coder_x0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [31:0] x;
  logic [4:0]  y;
  logic        even_active;

  scaled_coder #(.USE_X0(1'b1)) dut (.x(x), .y(y), .even_active(even_active));

  function automatic logic [4:0] or_of_indices(input logic [31:0] v);
    logic [4:0] r = '0;
    for (int k = 0; k < 32; k++) if (v[k]) r |= 5'(k);
    return r;
  endfunction

  task automatic apply(input logic [31:0] v);
    logic exp_even;
    exp_even = 1'b0;
    for (int k = 0; k < 32; k += 2) exp_even |= v[k];
    @(posedge clk);
    x = v;
    @(negedge clk);
    checks += 2;
    if (y !== or_of_indices(v) || even_active !== exp_even) begin
      failures++;
      $display("FAIL x=%h y=%0d (exp %0d) even_active=%b (exp %b)", v, y, or_of_indices(v),
               even_active, exp_even);
    end
    if ((even_active | y[0]) !== (|v)) begin
      failures++;
      $display("FAIL x=%h activity not recognised", v);
    end
  endtask

  initial begin
    x = '0;
    apply('0);
    for (int k = 0; k < 32; k++) apply(32'(1) << k);
    for (int r = 0; r < 200; r++) apply($urandom);
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
