// Behavioural model (not synthesizable logic) of the current-steering
// charge pump.
//
// The real part is a cascode current-source pair with UP/UP_b and DN/DN_b
// steering switches; its output current charges the loop filter. The model
// returns the net output current in amperes: +ICP_UP while UP is active,
// -ICP_DN while DN is active, their sum while both are (during the PFD
// clear overlap), and 0 otherwise. A source counts as active only when its
// two complementary controls agree (UP = 1 and UP_b = 0). The 25 uA design
// current is the design's; the ideal, mismatch-free switching is the model's.
//
// Timing: the output follows the inputs with no delay.
module charge_pump #(
  parameter real ICP_UP = 25.0e-6,
  parameter real ICP_DN = 25.0e-6
) (
  input  logic up,
  input  logic up_b,
  input  logic dn,
  input  logic dn_b,
  output real  i_out
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    i_out = 0.0;
    if (up && !up_b) i_out = i_out + ICP_UP;
    if (dn && !dn_b) i_out = i_out - ICP_DN;
  end
endmodule
