// tb_coeff_reg: the four coefficient registers must load together on the
// rising edge of btn only, and hold while btn stays high or low.
module tb_coeff_reg;
  import integral_pkg::*;
  logic   clk = 1'b0, rst, btn, btn_prev;
  coeff_t a_in [4], a_bus [4], model [4];
  int checks = 0, failures = 0, loads = 0;

  coeff_reg dut (.clk, .rst, .btn, .a_in, .a_bus);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; btn = 1'b0; btn_prev = 1'b0;
    for (int k = 0; k < 4; k++) begin a_in[k] = '0; model[k] = '0; end
    @(posedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 600; i++) begin
      btn = ($urandom % 3) == 0 ? ~btn : btn;
      for (int k = 0; k < 4; k++) a_in[k] = 8'($urandom);
      @(posedge clk);
      if (btn && !btn_prev) begin
        loads++;
        for (int k = 0; k < 4; k++) model[k] = a_in[k];
      end
      btn_prev = btn;
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (a_bus[k] !== model[k]) begin failures++; $display("cycle %0d a%0d=%0d exp %0d", i, k, a_bus[k], model[k]); end
      end
    end
    checks++; if (loads < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
