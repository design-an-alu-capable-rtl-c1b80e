// tb_limits: random load/data sequence; both limit registers must follow
// their inputs when load is high and hold otherwise.
module tb_limits;
  logic clk = 1'b0, rst, load;
  logic signed [7:0] din_a, din_b, val_a, val_b, ma, mb;
  int checks = 0, failures = 0;

  limits dut (.clk, .rst, .load, .din_a, .din_b, .val_a, .val_b);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load = 1'b0; din_a = '0; din_b = '0; ma = '0; mb = '0;
    @(posedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      load = ($urandom % 3) == 0; din_a = 8'($urandom); din_b = 8'($urandom);
      @(posedge clk);
      if (load) begin ma = din_a; mb = din_b; end
      #1;
      checks += 2;
      if (val_a !== ma) begin failures++; $display("val_a %0d exp %0d", val_a, ma); end
      if (val_b !== mb) begin failures++; $display("val_b %0d exp %0d", val_b, mb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
