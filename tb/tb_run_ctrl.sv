// tb_run_ctrl: random set/clear pulses against a set-dominant flag model.
module tb_run_ctrl;
  logic clk = 1'b0, rst, go_pulse, done_pulse, run, model;
  int checks = 0, failures = 0;

  run_ctrl dut (.clk, .rst, .go_pulse, .done_pulse, .run);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; go_pulse = 1'b0; done_pulse = 1'b0; model = 1'b0;
    @(posedge clk); #1 rst = 1'b0;
    checks++; if (run !== 1'b0) failures++;
    for (int i = 0; i < 800; i++) begin
      go_pulse = ($urandom % 5) == 0; done_pulse = ($urandom % 4) == 0;
      @(posedge clk);
      if (go_pulse) model = 1'b1; else if (done_pulse) model = 1'b0;
      #1;
      checks++;
      if (run !== model) begin failures++; $display("cycle %0d run=%b exp=%b", i, run, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
