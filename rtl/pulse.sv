// pulse: rising-edge detector that turns a level into a one-clock pulse.
//
// A flip-flop keeps last cycle's value of done; done_pulse = done & ~done_q is
// high in the first clock cycle in which done is seen high and low afterwards,
// however long done stays high. The output is combinational from done, so the
// pulse appears in the same cycle as the rising input. This is the structure
// of the original edge detector; the synchronous reset (which makes an input
// already high after reset produce a pulse) is this implementation's choice.
module pulse (
  input  logic clk,
  input  logic rst,
  input  logic done,
  output logic done_pulse
);

  logic done_q;

  always_ff @(posedge clk) begin
    if (rst) done_q <= 1'b0;
    else     done_q <= done;
  end

  assign done_pulse = done & ~done_q;

endmodule
