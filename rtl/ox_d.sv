// ox_d: write-pulse generator for one decoder output.
//
// The decoder line dec_ox is delayed by one flip-flop; we = run & dec_ox &
// ~dec_ox_q is a single-cycle write enable in the first cycle the decoder line
// is high, and only while the unit is running. It is how the coefficient
// processor turns "counter is at term n" into exactly one register write. The
// gate structure follows the design; the synchronous reset is this
// implementation's choice.
module ox_d (
  input  logic clk,
  input  logic rst,
  input  logic dec_ox,
  input  logic run,
  output logic we
);

  logic dec_q;

  always_ff @(posedge clk) begin
    if (rst) dec_q <= 1'b0;
    else     dec_q <= dec_ox;
  end

  assign we = run & dec_ox & ~dec_q;

endmodule
