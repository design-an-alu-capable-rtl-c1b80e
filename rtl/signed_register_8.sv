// signed_register_8: W-bit signed storage register with write enable.
//
// On a rising clock edge the register takes d when load is high and holds its
// value otherwise. rst (synchronous, active high) clears it to 0, matching the
// all-zero power-up value of the original register. Output q is available the
// cycle after the write. The 8-bit width and load/clock interface follow the
// design; the synchronous reset is this implementation's choice.
module signed_register_8 #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                load,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end

endmodule
