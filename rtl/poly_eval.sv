// poly_eval: evaluates F(x) = C1 x + C2 x^2 + C3 x^3 + C4 x^4 for one x.
//
// Horner's scheme, one term per clock: start clears the 16-bit accumulator Y,
// loads the term counter with NT-1 and sets RUN. Each running cycle adds the
// coefficient picked by the counter (C4 first, C1 last) to Y and multiplies
// the sum by x: Y <- x * (Y + C[cnt]). After NT steps Y = x(C1 + x(C2 + x(C3 +
// x C4))). done_pulse is high for the one cycle after the last step, when f_x
// is final; busy is the RUN flag. With NT = 4: start in cycle 0, steps in
// cycles 1..4, done_pulse and the final f_x in cycle 5.
//
// As in the design, the multiplier is W x W and takes only the low W bits of
// (Y + C), so every intermediate value must lie in -128..127 (only the last
// product uses the full 16 bits). The counter, multiplexer, multiplier, adder,
// 16-bit accumulator and RUN flag follow the design; the order "add, then
// multiply", the down-counting and the registered done_pulse are this
// implementation's choices. Coefficients are sign-extended.
module poly_eval
  import integral_pkg::*;
#(
  parameter int unsigned NT = NTERMS
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  coeff_t x_in,
  input  coeff_t c [NT],
  output wide_t  f_x,
  output logic   done_pulse,
  output logic   busy
);

  localparam int unsigned CW = (NT > 1) ? $clog2(NT) : 1;

  logic          run;
  logic          last;
  logic [CW-1:0] cnt;
  wide_t         y;
  coeff_t        sum;     // low W bits of Y + C, the multiplier operand
  wide_t         product;

  run_ctrl u_run (.clk, .rst, .go_pulse(start), .done_pulse(last), .run);

  assign last = run && (cnt == '0);
  assign sum  = y[W-1:0] + c[cnt];

  mul8s #(.W(W)) u_mul (.a(x_in), .b(sum), .product);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt        <= '0;
      y          <= '0;
      done_pulse <= 1'b0;
    end else begin
      done_pulse <= last && !start;
      if (start) begin
        cnt <= CW'(NT-1);
        y   <= '0;
      end else if (run) begin
        cnt <= cnt - 1'b1;
        y   <= product;
      end
    end
  end

  assign f_x  = y;
  assign busy = run;

endmodule
