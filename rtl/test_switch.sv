// Test-access switch in front of one PFD input (SW1 for the reference, SW2
// for the feedback).
//
// Two 2-input NAND gates give out = X&Y | ~Z, with X = START_BIST,
// Y = functional signal (RCK or FBK) and Z = the TSG line. With X = 0 (BIST
// mode) the PFD receives ~Z; with X = 1 and Z = 1 (normal mode) it receives
// Y. This is cheaper than a full 2:1 multiplexer but is only correct if Z is
// held at 1 in normal mode, which the TSG guarantees. Combinational.
module test_switch (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic out
);
  timeunit 1ns;
  timeprecision 1ps;

  logic nand_xy;

  assign nand_xy = ~(x & y);
  assign out     = ~(nand_xy & z);
endmodule
