// tb_poly_integral_alu: end-to-end test of the integral ALU at its default
// parameters.
//
// 1. The worked example: f(x) = 8x^3 + 3x^2 + 2x + 1 from 1 to 2 must give 41
//    (antiderivative coefficients 1, 1, 1, 2; F(2) = 46, F(1) = 5).
// 2. Hand-picked polynomials whose antiderivative coefficients are exact,
//    compared with the Newton-Leibniz value computed in real arithmetic.
// 3. Random signed coefficients and limits, compared with a model of the
//    datapath (round-to-nearest reciprocal table 16, 8, 5, 4 over 16; Horner
//    steps with 8-bit operands; 16-bit wrap-around result); whenever no
//    intermediate leaves the 8-bit range and every a_n/(n+1) is exact, the
//    result is also compared with the real-valued integral.
// Every calculation must report result_valid exactly 12 cycles after the btn
// edge, once, and busy must cover that interval. The mechanisms of the design
// are counted and each must occur: coefficient load, limit load, coefficient
// processing, both evaluations, result load, a rounded-up coefficient, a
// negative result, a long button press that must start only one calculation,
// a limit reload between calculations, a second btn edge during a calculation
// (with new coefficients on a_in, which must be ignored) and an 8-bit
// intermediate wrap.
module tb_poly_integral_alu;
  import integral_pkg::*;
  logic   clk = 1'b0, rst, btn, lim_load, result_valid, busy;
  coeff_t a_in [4], lim_upper, lim_lower;
  wide_t  result;
  int checks = 0, failures = 0;
  int n_coeff_load = 0, n_lim_load = 0, n_proc = 0, n_eval_a = 0, n_eval_b = 0;
  int n_result = 0, n_round_up = 0, n_negative = 0, n_long_press = 0, n_wrap = 0;
  int n_exact = 0, n_ignored = 0;
  int table_k [4] = '{16, 8, 5, 4};

  poly_integral_alu dut (.clk, .rst, .btn, .a_in, .lim_load, .lim_upper, .lim_lower,
                         .result, .result_valid, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled inside the design
  always @(posedge clk) if (!rst) begin
    if (dut.u_coeff.load)      n_coeff_load++;
    if (dut.cp_done_pulse)     n_proc++;
    if (dut.load_a)            n_eval_a++;
    if (dut.load_b)            n_eval_b++;
    if (dut.load_result)       n_result++;
  end

  function automatic int s8(int v);
    return int'(signed'(8'(v)));
  endfunction

  function automatic int s16(int v);
    return int'(signed'(16'(v)));
  endfunction

  function automatic int int_coeff(int a, int n);
    return s8(int'($floor((real'(a * table_k[n]) + 8.0) / 16.0)));
  endfunction

  // F(x) as the datapath forms it; sets wrapped when an 8-bit operand wraps
  function automatic int model_f(int x, int b[4], ref bit wrapped);
    int y, s;
    y = 0;
    for (int n = 3; n >= 0; n--) begin
      s = y + b[n];
      if (s != s8(s)) wrapped = 1'b1;
      y = x * s8(s);
    end
    return y;
  endfunction

  task automatic load_limits(input int up, input int lo);
    lim_upper = 8'(up); lim_lower = 8'(lo); lim_load = 1'b1;
    @(posedge clk); #1 lim_load = 1'b0;
    n_lim_load++;
  endtask

  // one calculation; returns the result
  // press: cycles btn is held; with_lim: limits are written in the btn cycle;
  // repress: btn is pressed again in cycles 5-6 with other coefficients
  task automatic calc(input int a[4], input int up, input int lo, input int press, input bit with_lim,
                      input bit repress, output int got);
    int vcyc, nvalid, b[4], fu, fl, expv;
    bit wrapped, exact_ok;
    real exact;
    for (int k = 0; k < 4; k++) a_in[k] = 8'(a[k]);
    btn = 1'b1;
    if (with_lim) begin
      lim_upper = 8'(up); lim_lower = 8'(lo); lim_load = 1'b1; n_lim_load++;
    end
    vcyc = -1; nvalid = 0; got = 0;
    for (int cyc = 1; cyc <= 16; cyc++) begin
      @(posedge clk); #1;
      lim_load = 1'b0;
      if (cyc == press) btn = 1'b0;
      if (repress && cyc == 5) begin
        btn = 1'b1;
        for (int k = 0; k < 4; k++) a_in[k] = 8'($urandom);
        n_ignored++;
      end
      if (repress && cyc == 7) btn = 1'b0;
      if (cyc >= 1 && cyc < 12) begin
        checks++; if (!busy) begin failures++; $display("busy low in cycle %0d", cyc); end
      end
      if (result_valid) begin
        nvalid++;
        if (vcyc < 0) begin vcyc = cyc; got = int'(result); end
      end
    end
    btn = 1'b0;
    if (press > 1) n_long_press++;
    checks += 2;
    if (vcyc != 12) begin failures++; $display("result_valid in cycle %0d, expected 12", vcyc); end
    if (nvalid != 1) begin failures++; $display("%0d result_valid strobes", nvalid); end
    // model
    wrapped = 1'b0; exact_ok = 1'b1;
    for (int n = 0; n < 4; n++) begin
      b[n] = int_coeff(a[n], n);
      if (((a[n] * table_k[n]) & 15) >= 8) n_round_up++;
      if (real'(b[n]) != real'(a[n]) / real'(n + 1)) exact_ok = 1'b0;
    end
    fu = model_f(up, b, wrapped);
    fl = model_f(lo, b, wrapped);
    expv = s16(fu - fl);
    if (wrapped) n_wrap++;
    checks++;
    if (got != expv) begin
      failures++;
      $display("a=%p limits %0d..%0d: got %0d expected %0d", a, lo, up, got, expv);
    end
    if (expv < 0) n_negative++;
    if (!wrapped && exact_ok && fu - fl == expv) begin
      exact = 0.0;
      for (int n = 0; n < 4; n++)
        exact += real'(a[n]) / real'(n + 1) * (real'(up) ** (n + 1) - real'(lo) ** (n + 1));
      n_exact++;
      checks++;
      if (real'(got) != exact) begin failures++; $display("a=%p: got %0d, integral %f", a, got, exact); end
    end
  endtask

  initial begin
    int got;
    rst = 1'b1; btn = 1'b0; lim_load = 1'b0; lim_upper = '0; lim_lower = '0;
    for (int k = 0; k < 4; k++) a_in[k] = '0;
    repeat (3) @(posedge clk); #1 rst = 1'b0;

    // worked example
    load_limits(2, 1);
    calc('{1, 2, 3, 8}, 2, 1, 1, 1'b0, 1'b0, got);
    checks++;
    if (got != 41) begin failures++; $display("worked example gave %0d, expected 41", got); end

    // exact antiderivatives: integral of 2 + 4x + 6x^2 + 8x^3 from -1 to 2
    load_limits(2, -1);
    calc('{2, 4, 6, 8}, 2, -1, 3, 1'b0, 1'b1, got);
    checks++;
    if (got != 60) begin failures++; $display("case 2 gave %0d, expected 60", got); end
    // integral of -3 x^2 from 0 to 3 = -27
    load_limits(3, 0);
    calc('{0, 0, -3, 0}, 3, 0, 1, 1'b0, 1'b0, got);
    checks++;
    if (got != -27) begin failures++; $display("case 3 gave %0d, expected -27", got); end

    // random: small values, then full range
    for (int i = 0; i < 400; i++) begin
      int a[4], up, lo;
      if (i < 200) begin
        for (int k = 0; k < 4; k++) a[k] = int'($urandom % 13) - 6;
        if (i % 2 == 0) begin a[1] = 2 * a[1]; a[2] = 3 * (a[2] / 2); a[3] = 4 * (a[3] / 2); end
        up = int'($urandom % 7) - 3; lo = int'($urandom % 7) - 3;
      end else begin
        for (int k = 0; k < 4; k++) a[k] = int'($urandom % 256) - 128;
        up = int'($urandom % 256) - 128; lo = int'($urandom % 256) - 128;
      end
      if (i % 5 != 1) load_limits(up, lo);
      calc(a, up, lo, (i % 7 == 3) ? 14 : 1 + int'($urandom % 3), i % 5 == 1,
           i % 7 != 3 && i % 4 == 2, got);
      repeat ($urandom % 3) @(posedge clk);
      #1;
    end

    // every mechanism must have happened
    checks += 11;
    if (n_ignored < 50)              begin failures++; $display("ignored presses: %0d", n_ignored); end
    if (n_coeff_load < 400)          begin failures++; $display("coefficient loads: %0d", n_coeff_load); end
    if (n_lim_load < 400)            begin failures++; $display("limit loads: %0d", n_lim_load); end
    if (n_proc < 400)                begin failures++; $display("coefficient runs: %0d", n_proc); end
    if (n_eval_a != n_proc)          begin failures++; $display("upper evaluations: %0d", n_eval_a); end
    if (n_eval_b != n_proc)          begin failures++; $display("lower evaluations: %0d", n_eval_b); end
    if (n_result != n_proc)          begin failures++; $display("result loads: %0d", n_result); end
    if (n_round_up == 0)             begin failures++; $display("no rounded-up coefficient"); end
    if (n_negative == 0)             begin failures++; $display("no negative result"); end
    if (n_long_press == 0)           begin failures++; $display("no long press"); end
    if (n_wrap == 0)                 begin failures++; $display("no 8-bit wrap"); end
    checks++; if (n_exact < 50)      begin failures++; $display("only %0d exact comparisons", n_exact); end
    $display("coefficient loads %0d, limit loads %0d, processing runs %0d, evaluations %0d/%0d, results %0d",
             n_coeff_load, n_lim_load, n_proc, n_eval_a, n_eval_b, n_result);
    $display("rounded-up terms %0d, negative results %0d, long presses %0d, ignored presses %0d, wraps %0d, exact comparisons %0d",
             n_round_up, n_negative, n_long_press, n_ignored, n_wrap, n_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
