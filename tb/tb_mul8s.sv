// tb_mul8s: exhaustive check of all 65536 signed 8-bit operand pairs against
// integer multiplication.
module tb_mul8s;
  logic signed [7:0]  a, b;
  logic signed [15:0] product;
  int checks = 0, failures = 0;

  mul8s dut (.a, .b, .product);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        a = 8'(i); b = 8'(j); #1;
        checks++;
        if (int'(product) != i * j) begin
          failures++;
          if (failures < 10) $display("%0d * %0d: got %0d", i, j, product);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
