// Behavioural model (not synthesizable logic) of the second-order passive
// loop filter: C1 in series with R, in parallel with C2, both to ground.
//
// The charge-pump current i_in flows into the V_ctrl node. With vc1 the
// voltage across C1 and vout the node voltage:
//   i_R   = (vout - vc1) / R
//   dvc1  = i_R / C1 * dt
//   dvout = (i_in - i_R) / C2 * dt
// The state is advanced by forward Euler at every change of i_in (so
// current pulses of any width are integrated exactly in charge) and at
// least every TSTEP_NS nanoseconds in between. The node is held inside the
// supply rails V_LOW..V_HIGH, standing for the charge pump's output range.
// Component values are the design's (C1 = 76.9 pF, C2 = 7.5 pF,
// R = 26.9 kOhm); the rail clamp, start voltage and step are the model's.
//
// Voltages are relative to mid-supply (the circuit runs from +-1.5 V).
module loop_filter #(
  parameter real C1_F     = 76.9e-12,
  parameter real C2_F     = 7.5e-12,
  parameter real R_OHM    = 26.9e3,
  parameter real V_INIT   = -1.5,
  parameter real V_LOW    = -1.5,
  parameter real V_HIGH   = 1.5,
  parameter real TSTEP_NS = 1.0
) (
  input  real i_in,
  output real vctrl
);
  timeunit 1ns;
  timeprecision 1ps;

  real vc1, vout, i_held, t_last;

  // Integrate from t_last to now with the current that flowed meanwhile.
  task automatic advance();
    real dt, i_r;
    dt = ($realtime - t_last) * 1.0e-9;
    t_last = $realtime;
    if (dt > 0.0) begin
      i_r  = (vout - vc1) / R_OHM;
      vc1  = vc1 + i_r / C1_F * dt;
      vout = vout + (i_held - i_r) / C2_F * dt;
      if (vout > V_HIGH) vout = V_HIGH;
      if (vout < V_LOW)  vout = V_LOW;
      if (vc1 > V_HIGH)  vc1 = V_HIGH;
      if (vc1 < V_LOW)   vc1 = V_LOW;
    end
    vctrl = vout;
  endtask

  always @(i_in) begin
    advance();
    i_held = i_in;
  end

  initial begin
    vc1    = V_INIT;
    vout   = V_INIT;
    i_held = 0.0;
    t_last = 0.0;
    vctrl  = V_INIT;
    forever begin
      #(TSTEP_NS);
      advance();
    end
  end
endmodule
