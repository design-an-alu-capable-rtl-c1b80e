// tb_const_rom: the table must hold 0x10, 0x08, 0x05, 0x04, i.e. 16/(n+1)
// rounded to the nearest integer.
module tb_const_rom;
  logic [1:0] addr;
  logic [7:0] const_out;
  logic [7:0] expected [4] = '{8'h10, 8'h08, 8'h05, 8'h04};
  int checks = 0, failures = 0;

  const_rom dut (.addr, .const_out);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4; n++) begin
      addr = 2'(n); #1;
      checks++;
      if (const_out !== expected[n]) begin
        failures++; $display("addr %0d: got %h expected %h", n, const_out, expected[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
