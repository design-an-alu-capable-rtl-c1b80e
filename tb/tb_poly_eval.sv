// tb_poly_eval: evaluates F(x) = C1 x + C2 x^2 + C3 x^3 + C4 x^4.
// Small operands (no intermediate leaves -128..127) are compared with the
// exact polynomial value; random full-range operands are compared with a
// model of the 8-bit-operand Horner datapath. Timing: done_pulse must come
// exactly 5 cycles after start and last one cycle.
module tb_poly_eval;
  import integral_pkg::*;
  logic   clk = 1'b0, rst, start, done_pulse, busy;
  coeff_t x_in, c [4];
  wide_t  f_x;
  int checks = 0, failures = 0, exact_cases = 0;

  poly_eval dut (.clk, .rst, .start, .x_in, .c, .f_x, .done_pulse, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exact value when it fits, else -99999
  function automatic int exact_f(int x, int c1, int c2, int c3, int c4);
    int h3, h2, h1;
    h3 = c3 + x * c4;  h2 = c2 + x * h3;  h1 = c1 + x * h2;
    if (c4 < -128 || c4 > 127 || h3 < -128 || h3 > 127 || h2 < -128 || h2 > 127 || h1 < -128 || h1 > 127)
      return -99999;
    return x * h1;
  endfunction

  function automatic int model_f(int x, int cc[4]);
    int y;
    y = 0;
    for (int n = 3; n >= 0; n--) begin
      y = int'(signed'(8'(y + cc[n])));   // low 8 bits, signed
      y = x * y;
    end
    return y;
  endfunction

  task automatic run_case(input int x, c1, c2, c3, c4);
    int dcyc, npulse, exp_model, exp_exact, cc[4];
    x_in = 8'(x); c[0] = 8'(c1); c[1] = 8'(c2); c[2] = 8'(c3); c[3] = 8'(c4);
    cc = '{c1, c2, c3, c4};
    start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    dcyc = -1; npulse = 0;
    for (int cyc = 1; cyc <= 7; cyc++) begin
      if (done_pulse) begin
        npulse++;
        if (dcyc < 0) begin
          dcyc = cyc;
          exp_model = model_f(x, cc);
          checks++;
          if (int'(f_x) != exp_model) begin failures++; $display("x=%0d c=%p: got %0d model %0d", x, cc, f_x, exp_model); end
          exp_exact = exact_f(x, c1, c2, c3, c4);
          if (exp_exact != -99999) begin
            exact_cases++;
            checks++;
            if (int'(f_x) != exp_exact) begin failures++; $display("x=%0d: got %0d exact %0d", x, f_x, exp_exact); end
          end
        end
      end
      @(posedge clk); #1;
    end
    checks += 2;
    if (dcyc != 5) begin failures++; $display("done_pulse in cycle %0d, expected 5", dcyc); end
    if (npulse != 1) begin failures++; $display("%0d done pulses", npulse); end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; x_in = '0;
    for (int k = 0; k < 4; k++) c[k] = '0;
    repeat (2) @(posedge clk); #1 rst = 1'b0;
    // worked example: integral coefficients 1, 1, 1, 2 at x = 2 and x = 1
    run_case(2, 1, 1, 1, 2);
    checks++; if (f_x != 46) begin failures++; $display("F(2)=%0d, expected 46", f_x); end
    run_case(1, 1, 1, 1, 2);
    checks++; if (f_x != 5) begin failures++; $display("F(1)=%0d, expected 5", f_x); end
    for (int i = 0; i < 300; i++)
      run_case(int'($urandom % 7) - 3, int'($urandom % 11) - 5, int'($urandom % 11) - 5,
               int'($urandom % 11) - 5, int'($urandom % 11) - 5);
    for (int i = 0; i < 300; i++)
      run_case(int'($urandom % 256) - 128, int'($urandom % 256) - 128, int'($urandom % 256) - 128,
               int'($urandom % 256) - 128, int'($urandom % 256) - 128);
    checks++; if (exact_cases < 100) begin failures++; $display("only %0d exact cases", exact_cases); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
