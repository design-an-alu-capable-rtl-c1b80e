// register_16: W-bit (16 by default) signed register with write enable, used
// for the two polynomial values and the final integral.
//
// On a rising clock edge the register takes d when load is high and holds
// otherwise; rst (synchronous, active high) clears it to 0. The 16-bit width
// and the load/clock interface follow the design; the synchronous reset is
// this implementation's choice.
module register_16 #(
  parameter int unsigned W = 16
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
