// const_rom: 4 x 8 constant table of reciprocals 1/(n+1) in fixed point.
//
// Entry n holds round(2^FRAC / (n+1)); with the default FRAC = 4 the contents
// are 0x10, 0x08, 0x05, 0x04, the values of the original table. Multiplying a
// coefficient a_n by entry n and dropping FRAC bits gives a_n/(n+1), the
// coefficient of the antiderivative. Purely combinational: const_out follows
// addr in the same cycle. The table is computed from its formula at
// elaboration rather than stored as literal data.
module const_rom
  import integral_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned FBITS = 4
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [7:0]               const_out
);

  logic [7:0] rom [DEPTH];

  always_comb begin
    for (int unsigned n = 0; n < DEPTH; n++) rom[n] = 8'(recip_const(n, FBITS));
  end

  assign const_out = rom[addr];

endmodule
