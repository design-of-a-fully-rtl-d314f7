// Behavioural model (not synthesizable logic) of the seven-stage
// current-starved ring oscillator.
//
// In silicon V_ctrl sets the current through seven starved inverters, each
// loaded by 220 fF, and so their delay. The model uses the linearised
// characteristic
//   f = F_CENTER_MHZ + KVCO_MRAD / (2*pi) * vctrl     [MHz, vctrl in V]
// limited to the oscillator's designed band F_LOW_MHZ..F_HIGH_MHZ. With the
// design gain of 290 Mrad/Vs the 40-100 MHz tuning range spans 1.3 V,
// placed here symmetrically around 0 V. The gain and band are the design's;
// the linear curve and its centre are the model's. The output toggles every
// half period, the period being re-evaluated at each toggle. The delay is
// computed at run time (lint cannot prove it non-zero); it is at least
// 500/F_HIGH_MHZ ns.
module vco #(
  parameter real F_CENTER_MHZ = 70.0,
  parameter real KVCO_MRAD    = 290.0,
  parameter real F_LOW_MHZ    = 30.0,
  parameter real F_HIGH_MHZ   = 105.0
) (
  input  real  vctrl,
  output logic vco_out
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam real PI = 3.14159265358979;

  function automatic real freq_mhz(input real v);
    real f;
    f = F_CENTER_MHZ + KVCO_MRAD / (2.0 * PI) * v;
    if (f < F_LOW_MHZ)  f = F_LOW_MHZ;
    if (f > F_HIGH_MHZ) f = F_HIGH_MHZ;
    return f;
  endfunction

  real half_ns;

  initial vco_out = 1'b0;

  always begin
    half_ns = 500.0 / freq_mhz(vctrl);
    #(half_ns);
    vco_out = ~vco_out;
  end
endmodule
