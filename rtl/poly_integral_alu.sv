// poly_integral_alu: 8-bit ALU that computes the definite integral of a cubic
// polynomial f(x) = a0 + a1 x + a2 x^2 + a3 x^3 between two integer limits by
// the Newton-Leibniz formula: result = F(upper) - F(lower), where
// F(x) = a0 x + a1/2 x^2 + a2/3 x^3 + a3/4 x^4.
//
// Flow (no separate state machine; each stage starts on the edge of the
// previous stage's done signal, delayed where needed):
//   cycle 0      rising edge of btn: coeff_reg stores a_in
//   cycle 1      delayed button pulse starts coeff_proc
//   cycles 2-5   coeff_proc forms a_n/(n+1), one term per cycle, reading a_sel
//                through a multiplexer; its done edge starts both poly_evals
//   cycles 6-9   two poly_eval units evaluate F(upper) and F(lower) in parallel
//   cycle 10     their done pulses load the 16-bit registers F_a and F_b
//   cycle 11     both flags set: the difference F_a - F_b is loaded
//   cycle 12     result holds the integral, result_valid is high for one cycle
// The limits are written separately, whenever lim_load is high, and must be
// stable from cycle 6 to 9. busy is high from the btn edge to result_valid;
// a btn edge while busy is high is ignored, so one calculation always runs to
// completion with the coefficients present at its own btn edge.
//
// Interface: btn, lim_load are levels (btn is edge-detected); a_in, lim_upper,
// lim_lower are signed 8-bit; result is signed 16-bit and wraps on overflow.
// The block structure (coefficient bank, limit registers, coefficient
// processor, two polynomial evaluators, two 16-bit registers, subtractor,
// result register, edge pulses between stages) follows the design; the exact
// cycle-by-cycle handshake and the flag logic that joins the two evaluators
// are this implementation's.
module poly_integral_alu
  import integral_pkg::*;
#(
  parameter int unsigned NT = NTERMS
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   btn,
  input  coeff_t a_in [NT],
  input  logic   lim_load,
  input  coeff_t lim_upper,
  input  coeff_t lim_lower,
  output wide_t  result,
  output logic   result_valid,
  output logic   busy
);

  localparam int unsigned CW = $clog2(NT);

  coeff_t        a_bus     [NT];
  coeff_t        int_coeff [NT];
  coeff_t        val_a, val_b, coeff_sel;
  logic [CW-1:0] sel;
  logic          btn_pulse, press, go;
  logic          cp_done, cp_done_pulse;
  logic          pe_a_done, pe_b_done, pe_a_busy, pe_b_busy;
  logic          load_a, load_b;
  logic          flag_a, flag_b, both, load_result;
  wide_t         f_a_x, f_b_x, f_a, f_b;

  // ---- inputs ----------------------------------------------------------
  // a button edge is accepted only while no calculation is running
  pulse u_btn_pulse (.clk, .rst, .done(btn), .done_pulse(btn_pulse));

  assign press = btn_pulse & ~busy;

  coeff_reg #(.NT(NT)) u_coeff (.clk, .rst, .btn(press), .a_in, .a_bus);

  limits u_limits (
    .clk, .rst,
    .load  (lim_load),
    .din_a (lim_upper),
    .din_b (lim_lower),
    .val_a,
    .val_b
  );

  // start the coefficient processor one cycle after the coefficients are stored
  always_ff @(posedge clk) begin
    if (rst) go <= 1'b0;
    else     go <= press;
  end

  // ---- antiderivative coefficients ---------------------------------------
  assign coeff_sel = a_bus[sel];

  coeff_proc #(.NT(NT)) u_coeff_proc (
    .clk, .rst,
    .go_pulse   (go),
    .done_pulse (cp_done_pulse),
    .coeff_in   (coeff_sel),
    .sel,
    .done       (cp_done),
    .int_coeff
  );

  pulse u_cp_pulse (.clk, .rst, .done(cp_done), .done_pulse(cp_done_pulse));

  // ---- F(upper) and F(lower) in parallel ---------------------------------
  poly_eval #(.NT(NT)) u_eval_a (
    .clk, .rst,
    .start      (cp_done_pulse),
    .x_in       (val_a),
    .c          (int_coeff),
    .f_x        (f_a_x),
    .done_pulse (pe_a_done),
    .busy       (pe_a_busy)
  );

  poly_eval #(.NT(NT)) u_eval_b (
    .clk, .rst,
    .start      (cp_done_pulse),
    .x_in       (val_b),
    .c          (int_coeff),
    .f_x        (f_b_x),
    .done_pulse (pe_b_done),
    .busy       (pe_b_busy)
  );

  pulse u_pa_pulse (.clk, .rst, .done(pe_a_done), .done_pulse(load_a));
  pulse u_pb_pulse (.clk, .rst, .done(pe_b_done), .done_pulse(load_b));

  register_16 #(.W(RW)) u_f_a (.clk, .rst, .load(load_a), .d(f_a_x), .q(f_a));
  register_16 #(.W(RW)) u_f_b (.clk, .rst, .load(load_b), .d(f_b_x), .q(f_b));

  // ---- join and subtract --------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst || load_result || cp_done_pulse) begin
      flag_a <= 1'b0;
      flag_b <= 1'b0;
    end else begin
      if (load_a) flag_a <= 1'b1;
      if (load_b) flag_b <= 1'b1;
    end
  end

  assign both = flag_a & flag_b;

  pulse u_join_pulse (.clk, .rst, .done(both), .done_pulse(load_result));

  register_16 #(.W(RW)) u_result (.clk, .rst, .load(load_result), .d(f_a - f_b), .q(result));

  always_ff @(posedge clk) begin
    if (rst) begin
      result_valid <= 1'b0;
      busy         <= 1'b0;
    end else begin
      result_valid <= load_result;
      if (press)            busy <= 1'b1;
      else if (load_result) busy <= 1'b0;
    end
  end

  // the two evaluators are started together and must finish together
  assert property (@(posedge clk) disable iff (rst) pe_a_busy == pe_b_busy);

endmodule
