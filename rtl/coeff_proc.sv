// coeff_proc: turns the polynomial coefficients a_n into the coefficients
// a_n/(n+1) of its antiderivative, one term per clock.
//
// go_pulse sets RUN and clears the term counter. While RUN is high the counter
// steps 0, 1, .., NT-1; its value is output on sel so that the caller puts a_sel
// on coeff_in, and it also addresses the reciprocal table. The product
// coeff_in * round(2^FB/(sel+1)) is rounded to nearest and shifted right by FB
// bits. A decoder, enabled by RUN, raises line sel, and an ox_d per line turns
// its rising edge into one write of int_coeff[sel]. In the cycle the counter
// is at NT-1, done is high; the caller returns its rising edge on done_pulse,
// which clears RUN. With NT = 4: go_pulse in cycle 0, writes in cycles 1..4,
// done in cycle 4, results all valid from cycle 5.
//
// Counter, table, multiplier, decoder, per-term write pulses, result registers
// and the RUN flag follow the design. The rounding (needed for 3 * 5 / 16 to
// give 1 in the design's own worked example) and the decoder enable are this
// implementation's choices. Results are kept to W bits and wrap outside
// -128..127.
module coeff_proc
  import integral_pkg::*;
#(
  parameter int unsigned NT = NTERMS,
  parameter int unsigned FB = FRAC
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  go_pulse,
  input  logic                  done_pulse,
  input  coeff_t                coeff_in,
  output logic [$clog2(NT)-1:0] sel,
  output logic                  done,
  output coeff_t                int_coeff [NT]
);

  localparam int unsigned CW = $clog2(NT);

  logic              run;
  logic [CW-1:0]     cnt;
  logic [7:0]        const_val;
  logic signed [2*W-1:0] product;
  coeff_t            rounded;
  logic [NT-1:0]     dec;
  logic [NT-1:0]     we;

  run_ctrl u_run (.clk, .rst, .go_pulse, .done_pulse, .run);

  always_ff @(posedge clk) begin
    if (rst || go_pulse) cnt <= '0;
    else if (run)        cnt <= (cnt == CW'(NT-1)) ? '0 : cnt + 1'b1;
  end

  assign sel  = cnt;
  assign done = run && (cnt == CW'(NT-1));

  const_rom #(.DEPTH(NT), .FBITS(FB)) u_rom (.addr(cnt), .const_out(const_val));

  mul8s #(.W(W)) u_mul (.a(coeff_in), .b(const_val), .product);

  // round to nearest, ties towards +infinity
  assign rounded = W'((product + (2*W)'(1 << (FB-1))) >>> FB);

  always_comb begin
    for (int unsigned k = 0; k < NT; k++) dec[k] = run && (cnt == CW'(k));
  end

  for (genvar k = 0; k < NT; k++) begin : g_term
    ox_d u_we (.clk, .rst, .dec_ox(dec[k]), .run, .we(we[k]));

    signed_register_8 #(.W(W)) u_int (
      .clk,
      .rst,
      .load (we[k]),
      .d    (rounded),
      .q    (int_coeff[k])
    );
  end

endmodule
