// tb_pulse: random input levels; the output must be high exactly in the first
// cycle of each high run of the input.
module tb_pulse;
  logic clk = 1'b0, rst, done, done_pulse, prev;
  int checks = 0, failures = 0, pulses = 0;

  pulse dut (.clk, .rst, .done, .done_pulse);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; done = 1'b0; prev = 1'b0;
    @(posedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 800; i++) begin
      done = ($urandom % 3) != 0;
      #1;
      checks++;
      if (done_pulse !== (done && !prev)) begin
        failures++; $display("cycle %0d: done=%b prev=%b pulse=%b", i, done, prev, done_pulse);
      end
      if (done_pulse) pulses++;
      @(posedge clk); prev = done; #1;
    end
    checks++; if (pulses < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
