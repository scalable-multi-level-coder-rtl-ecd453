// tb_coder_level -- self-checking test of one conversion level.
//
// Three levels are instantiated: level 3 without B(0) (the top level of the 16-input
// coder), level 1 without B(0) (the last level, whose folded line 1 is y(0)) and
// level 4 with B(0) (the extra level that widens a 16-input coder to 32 inputs).
// Each is fed every one-hot word of its width plus the all-zero word. For active input
// number v, the level must give y = bit i of v and pass down a one-hot line at v's low
// i bits, except that line 0 stays low when B(0) is not built. Stimulus on the rising
// edge, checks on the falling edge of a testbench clock; a watchdog bounds the run.
module tb_coder_level;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] x3;  logic y3;  logic [7:0]  n3;
  logic [3:0]  x1;  logic y1;  logic [1:0]  n1;
  logic [31:0] x4;  logic y4;  logic [15:0] n4;

  coder_level #(.LEVEL(3))                 dut3 (.x(x3), .y(y3), .x_next(n3));
  coder_level #(.LEVEL(1))                 dut1 (.x(x1), .y(y1), .x_next(n1));
  coder_level #(.LEVEL(4), .KEEP_B0(1'b1)) dut4 (.x(x4), .y(y4), .x_next(n4));

  // Expected results for active input v (v < 0 means no input active).
  function automatic logic [15:0] exp_next(input int v, input int lvl, input bit keep0);
    logic [15:0] r = '0;
    int low;
    if (v >= 0) begin
      low = v % (1 << lvl);
      if (low != 0 || keep0) r[low] = 1'b1;
    end
    return r;
  endfunction

  function automatic logic exp_y(input int v, input int lvl);
    return (v >= 0) && (((v >> lvl) & 1) == 1);
  endfunction

  task automatic check(input string tag, input logic got_y, input logic exp_yv,
                       input logic [15:0] got_n, input logic [15:0] exp_n);
    checks++;
    if (got_y !== exp_yv || got_n !== exp_n) begin
      failures++;
      $display("FAIL %s y=%b (exp %b) x_next=%h (exp %h)", tag, got_y, exp_yv, got_n, exp_n);
    end
  endtask

  initial begin
    x3 = '0; x1 = '0; x4 = '0;
    for (int v = -1; v < 32; v++) begin
      @(posedge clk);
      x4 = (v >= 0) ? 32'(1) << v : '0;
      x3 = (v >= 0 && v < 16) ? 16'(1) << v : '0;
      x1 = (v >= 0 && v < 4) ? 4'(1) << v : '0;
      @(negedge clk);
      check("level4", y4, exp_y(v, 4), n4, exp_next(v, 4, 1'b1));
      if (v < 16) check("level3", y3, exp_y(v, 3), {8'h00, n3}, exp_next(v, 3, 1'b0));
      if (v < 4)  check("level1", y1, exp_y(v, 1), {14'h0, n1}, exp_next(v, 1, 1'b0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
