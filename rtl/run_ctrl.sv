// run_ctrl: the RUN flag of a sequenced unit.
//
// A set/clear flip-flop: go_pulse sets run on the next clock edge, done_pulse
// clears it. If both arrive in the same cycle go_pulse wins, so a new start is
// never lost. rst clears it synchronously. Only the name and the two pulse
// inputs come from the design; the internal form is this implementation's.
module run_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic go_pulse,
  input  logic done_pulse,
  output logic run
);

  always_ff @(posedge clk) begin
    if (rst)             run <= 1'b0;
    else if (go_pulse)   run <= 1'b1;
    else if (done_pulse) run <= 1'b0;
  end

endmodule
