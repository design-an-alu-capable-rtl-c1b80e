// mul8s: signed W x W multiplier with a full 2W-bit product.
//
// Both operands are two's complement; product = a * b exactly, so no result
// can overflow. Combinational. The original builds its 16-bit product from the
// low half and carry-out half of an 8-bit multiplier; here the full-width
// signed product is written directly.
module mul8s #(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] product
);

  // operands are sign-extended to the 2W-bit context width
  assign product = a * b;

endmodule
