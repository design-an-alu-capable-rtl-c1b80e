// limits: the two integration-limit registers.
//
// val_a holds the upper limit and val_b the lower limit. Both are written from
// din_a / din_b on every clock edge at which load is high (a level enable, as
// on the registers themselves) and hold otherwise. The pair of 8-bit signed
// registers with a shared load follows the design; which input is the upper
// limit is this implementation's reading of it.
module limits
  import integral_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   load,
  input  coeff_t din_a,
  input  coeff_t din_b,
  output coeff_t val_a,
  output coeff_t val_b
);

  signed_register_8 #(.W(W)) u_reg_a (.clk, .rst, .load, .d(din_a), .q(val_a));
  signed_register_8 #(.W(W)) u_reg_b (.clk, .rst, .load, .d(din_b), .q(val_b));

endmodule
