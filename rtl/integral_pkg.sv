// integral_pkg: widths, types and the reciprocal-constant formula shared by the
// polynomial definite-integral ALU.
//
// The ALU works on signed 8-bit coefficients and limits and produces a signed
// 16-bit result. The antiderivative coefficients a_n/(n+1) are formed with a
// fixed-point reciprocal 1/(n+1) held with FRAC fraction bits; at FRAC = 4 the
// table is 0x10, 0x08, 0x05, 0x04. The 8/16-bit widths and the four-term
// polynomial follow the design description; the fixed-point reading of the
// table is this implementation's interpretation of those four constants.
package integral_pkg;

  localparam int unsigned W      = 8;   // coefficient / limit width
  localparam int unsigned RW     = 16;  // polynomial value and result width
  localparam int unsigned NTERMS = 4;   // terms of f(x) = a0 + a1 x + a2 x^2 + a3 x^3
  localparam int unsigned FRAC   = 4;   // fraction bits of the reciprocal table

  typedef logic signed [W-1:0]  coeff_t;
  typedef logic signed [RW-1:0] wide_t;

  // round(2^frac / (n+1)), the reciprocal used for term n
  function automatic int unsigned recip_const(int unsigned n, int unsigned frac);
    int unsigned den;
    den = n + 1;
    return ((2 << frac) + den) / (2 * den);
  endfunction

endpackage
