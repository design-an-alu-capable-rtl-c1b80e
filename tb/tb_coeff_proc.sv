// tb_coeff_proc: runs the coefficient processor on the worked example
// (1, 2, 3, 8 -> 1, 1, 1, 2) and on random signed coefficients. The
// testbench plays the surrounding circuit: it multiplexes a_sel onto coeff_in
// and returns the rising edge of done on done_pulse. Expected values are
// round(a_n * 16/(n+1) rounded table entry / 16) worked out in real arithmetic.
// Timing: done must be high exactly 4 cycles after go_pulse, and the results
// must be in place one cycle later.
module tb_coeff_proc;
  import integral_pkg::*;
  logic       clk = 1'b0, rst, go_pulse, done_pulse, done, done_q;
  logic [1:0] sel;
  coeff_t     coeff_in, a [4], int_coeff [4];
  int         table_k [4] = '{16, 8, 5, 4};
  int checks = 0, failures = 0;

  coeff_proc dut (.clk, .rst, .go_pulse, .done_pulse, .coeff_in, .sel, .done, .int_coeff);

  always #5 clk = ~clk;
  assign coeff_in = a[sel];
  always_ff @(posedge clk) done_q <= rst ? 1'b0 : done;
  assign done_pulse = done & ~done_q;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_term(int coeff, int n);
    int v;
    v = int'($floor((real'(coeff * table_k[n]) + 8.0) / 16.0));
    return int'(signed'(8'(v)));   // as a signed 8-bit value
  endfunction

  task automatic run_case(input int c0, c1, c2, c3);
    int done_cycle;
    a[0] = 8'(c0); a[1] = 8'(c1); a[2] = 8'(c2); a[3] = 8'(c3);
    go_pulse = 1'b1;
    @(posedge clk); #1 go_pulse = 1'b0;
    done_cycle = -1;
    for (int cyc = 1; cyc <= 6; cyc++) begin
      if (done) begin
        if (done_cycle < 0) done_cycle = cyc;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (done_cycle != 4) begin failures++; $display("done in cycle %0d, expected 4", done_cycle); end
    for (int n = 0; n < 4; n++) begin
      checks++;
      if (int'(int_coeff[n]) != expect_term(int'(a[n]), n)) begin
        failures++;
        $display("a%0d=%0d: got %0d expected %0d", n, a[n], int_coeff[n], expect_term(int'(a[n]), n));
      end
    end
  endtask

  initial begin
    rst = 1'b1; go_pulse = 1'b0;
    for (int k = 0; k < 4; k++) a[k] = '0;
    repeat (2) @(posedge clk); #1 rst = 1'b0;
    // worked example: f(x) = 8x^3 + 3x^2 + 2x + 1
    run_case(1, 2, 3, 8);
    checks += 4;
    if (int_coeff[0] != 1 || int_coeff[1] != 1 || int_coeff[2] != 1 || int_coeff[3] != 2) begin
      failures++; $display("worked example wrong");
    end
    for (int i = 0; i < 200; i++)
      run_case(int'($urandom % 256) - 128, int'($urandom % 256) - 128,
               int'($urandom % 256) - 128, int'($urandom % 256) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
