// tb_signed_register_8: random load/data sequence against a reference model
// of a write-enabled register with synchronous reset to zero.
module tb_signed_register_8;
  logic clk = 1'b0, rst, load;
  logic signed [7:0] d, q, model;
  int checks = 0, failures = 0;

  signed_register_8 dut (.clk, .rst, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load = 1'b0; d = '0; model = '0;
    @(posedge clk); #1 rst = 1'b0;
    checks++; if (q !== 8'sd0) failures++;
    for (int i = 0; i < 500; i++) begin
      load = 1'($urandom); d = 8'($urandom);
      @(posedge clk);
      if (load) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("mismatch q=%0d exp=%0d", q, model); end
    end
    rst = 1'b1; load = 1'b1; d = 8'sh55; @(posedge clk); #1;
    checks++; if (q !== 8'sd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
