// Test stimulus generator: combinational decode of the BIST controller state.
//
// With state = {F,E,D,C,B,A}:
//   TCK      = A B D ~E ~F  +  A B ~C ~D ~E ~F      (states 3, 11, 15)
//   TFB      = A B D ~E ~F  +  ~A B D E F           (states 11, 15, 58, 62)
//   SEL_MODE = B + E + F + C ~D + ~C D              (0 only in states 0, 1, 12, 13)
// Because the controller counts down, the SEL_MODE = 0 states form two
// count windows of two BIST cycles (0.32 us): states 13-12 and 1-0.
//
// The switches in front of the PFD pass the complement of their TSG line in
// BIST mode and pass the functional signal only while that line is 1, so the
// TSG delivers tck_n = ~TCK and tfb_n = ~TFB, both forced to 1 while
// normal_mode (START_BIST) is 1. The three equations are the design's; the
// normal-mode forcing gate is this implementation's way of meeting the
// switch's stated precondition. Combinational.
module tsg (
  input  logic [5:0] state,
  input  logic       normal_mode,
  output logic       tck_n,
  output logic       tfb_n,
  output logic       sel_mode
);
  timeunit 1ns;
  timeprecision 1ps;

  logic a, b, c, d, e, f;
  logic tck, tfb;

  assign {f, e, d, c, b, a} = state;

  assign tck      = (a & b & d & ~e & ~f) | (a & b & ~c & ~d & ~e & ~f);
  assign tfb      = (a & b & d & ~e & ~f) | (~a & b & d & e & f);
  assign sel_mode = b | e | f | (c & ~d) | (~c & d);

  assign tck_n = ~tck | normal_mode;
  assign tfb_n = ~tfb | normal_mode;
endmodule
