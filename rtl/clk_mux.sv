// 2:1 clock multiplexer in front of the feedback divider.
//
// In normal mode (sel_normal = START_BIST = 1) the divider counts the VCO
// output and acts as the N = 32 feedback divider. In BIST mode
// (START_BIST = 0) it counts the 6.25 MHz BIST clock and acts as the BIST
// controller. Combinational; the select is a static mode pin, so the switch
// over is allowed to produce one short or long clock cycle.
module clk_mux (
  input  logic sel_normal,
  input  logic vco_clk,
  input  logic bist_clk,
  output logic clk_out
);
  timeunit 1ns;
  timeprecision 1ps;

  assign clk_out = sel_normal ? vco_clk : bist_clk;
endmodule
