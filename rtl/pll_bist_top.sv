// VHF charge-pump PLL frequency synthesizer (40-100 MHz, N = 32) with an
// all-digital, defect-oriented built-in self-test.
//
// Normal mode (start_bist = 1): ref_clk passes SW1 to the PFD, the VCO
// output clocks the six-stage ripple divider through the MUX, and its fifth
// stage (f_vco/32) passes SW2 as the feedback. PFD, charge pump and loop
// filter steer the VCO until f_out = 32 * f_ref.
//
// BIST mode (start_bist = 0): the MUX clocks the divider from bist_clk
// (6.25 MHz), turning it into a 64-state controller (10.24 us per cycle).
// The TSG decodes the state into test reference/feedback pulses that reach
// the PFD through SW1/SW2 and push the loop into continuous discharge,
// hold, or charge, and into SEL_MODE, which opens two 0.32 us windows per
// cycle in which the response collector counts VCO cycles. After each
// window the count is shifted out serially on bist_output, MSB first.
//
// The charge pump, loop filter and VCO are behavioural models; everything
// else is synthesizable logic. rst_n is an added asynchronous reset of all
// flip-flops.
module pll_bist_top (
  input  logic rst_n,
  input  logic ref_clk,
  input  logic bist_clk,
  input  logic start_bist,
  output logic output_freq,
  output logic bist_output
);
  timeunit 1ns;
  timeprecision 1ps;

  logic       pfd_ref, pfd_fbk;
  logic       up, up_b, dn, dn_b;
  real        i_cp, vctrl;
  logic       div_clk, fbk;
  logic [5:0] ctrl_state;
  logic       tck_n, tfb_n, sel_mode;

  test_switch u_sw1 (.x(start_bist), .y(ref_clk), .z(tck_n), .out(pfd_ref));
  test_switch u_sw2 (.x(start_bist), .y(fbk),     .z(tfb_n), .out(pfd_fbk));

  pfd u_pfd (.rst_n, .ref_in(pfd_ref), .fbk_in(pfd_fbk), .up, .up_b, .dn, .dn_b);

  charge_pump u_cp (.up, .up_b, .dn, .dn_b, .i_out(i_cp));

  loop_filter u_lpf (.i_in(i_cp), .vctrl);

  vco u_vco (.vctrl, .vco_out(output_freq));

  clk_mux u_mux (.sel_normal(start_bist), .vco_clk(output_freq), .bist_clk, .clk_out(div_clk));

  fb_divider u_div (.rst_n, .clk_in(div_clk), .state(ctrl_state), .fbk);

  tsg u_tsg (.state(ctrl_state), .normal_mode(start_bist), .tck_n, .tfb_n, .sel_mode);

  response_collector u_rc (.rst_n, .cnt_clk(output_freq), .bist_clk, .sel_mode,
                           .bist_output, .value());
endmodule
