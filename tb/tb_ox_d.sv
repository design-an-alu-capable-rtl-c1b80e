// tb_ox_d: random decoder-line and RUN levels; WE must be high only when RUN
// is high and the decoder line has just risen.
module tb_ox_d;
  logic clk = 1'b0, rst, dec_ox, run, we, prev;
  int checks = 0, failures = 0, writes = 0;

  ox_d dut (.clk, .rst, .dec_ox, .run, .we);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; dec_ox = 1'b0; run = 1'b0; prev = 1'b0;
    @(posedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 800; i++) begin
      dec_ox = 1'($urandom); run = ($urandom % 4) != 0;
      #1;
      checks++;
      if (we !== (run && dec_ox && !prev)) begin
        failures++; $display("cycle %0d: dec=%b run=%b prev=%b we=%b", i, dec_ox, run, prev, we);
      end
      if (we) writes++;
      @(posedge clk); prev = dec_ox; #1;
    end
    checks++; if (writes < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
