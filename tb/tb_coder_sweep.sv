// tb_coder_sweep -- the multi-level coder at every output width from 2 to 12 bits.
//
// One ml_coder is generated for each width n = 2 .. 12 (4 to 4096 inputs), both
// without and with the B(0) elements. All of them share one stimulus: the number v of
// the active input runs from 0 to 4095, and each coder sees input v if it has that
// many inputs and the all-zero word otherwise. Each coder must output v, or 0 when
// its input word is empty; with B(0) built, even_active must be 1 exactly when v is
// even and inside the coder's range. Stimulus on the rising edge, checks on the
// falling edge of a testbench clock; a watchdog bounds the run.
module tb_coder_sweep;
  localparam int NMIN = 2;
  localparam int NMAX = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned v = 0;

  logic [NMAX-1:0] y_plain [NMIN:NMAX];
  logic [NMAX-1:0] y_x0    [NMIN:NMAX];
  logic            ev_plain[NMIN:NMAX];
  logic            ev_x0   [NMIN:NMAX];

  for (genvar n = NMIN; n <= NMAX; n++) begin : g_n
    logic [2**n-1:0] xn;
    logic [n-1:0]    yp, yx;
    assign xn = (v < 2**n) ? (2**n)'(1) << v : '0;
    ml_coder #(.N(n))                 u_plain (.x(xn), .y(yp), .even_active(ev_plain[n]));
    ml_coder #(.N(n), .USE_X0(1'b1))  u_x0    (.x(xn), .y(yx), .even_active(ev_x0[n]));
    assign y_plain[n] = NMAX'(yp);
    assign y_x0[n]    = NMAX'(yx);
  end

  initial begin
    for (v = 0; v < 2**NMAX; v++) begin
      @(negedge clk);
      for (int n = NMIN; n <= NMAX; n++) begin
        int unsigned exp_y;
        logic        exp_ev;
        exp_y  = (v < 2**n) ? v : 0;
        exp_ev = (v < 2**n) && (v % 2 == 0);
        checks += 2;
        if (y_plain[n] !== NMAX'(exp_y) || ev_plain[n] !== 1'b0) begin
          failures++;
          $display("FAIL n=%0d v=%0d y=%0d even_active=%b", n, v, y_plain[n], ev_plain[n]);
        end
        if (y_x0[n] !== NMAX'(exp_y) || ev_x0[n] !== exp_ev) begin
          failures++;
          $display("FAIL n=%0d with B(0) v=%0d y=%0d even_active=%b", n, v, y_x0[n], ev_x0[n]);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2**NMAX + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
