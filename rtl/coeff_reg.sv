// coeff_reg: bank of the polynomial coefficient registers a0..a3.
//
// One signed_register_8 per coefficient, all loaded together: the rising edge
// of btn is turned into a single-cycle pulse, and on that clock edge every
// register takes its a_in value. a_bus shows the stored coefficients from the
// next cycle on, and holds them however long btn stays high. The structure
// (four registers, one shared pulse from the button) follows the design.
module coeff_reg
  import integral_pkg::*;
#(
  parameter int unsigned NT = NTERMS
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   btn,
  input  coeff_t a_in  [NT],
  output coeff_t a_bus [NT]
);

  logic load;

  pulse u_pulse (
    .clk,
    .rst,
    .done       (btn),
    .done_pulse (load)
  );

  for (genvar k = 0; k < NT; k++) begin : g_reg
    signed_register_8 #(.W(W)) u_reg (
      .clk,
      .rst,
      .load,
      .d    (a_in[k]),
      .q    (a_bus[k])
    );
  end

endmodule
