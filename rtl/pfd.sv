// Tri-state phase/frequency detector.
//
// A rising edge on ref_in sets UP, a rising edge on fbk_in sets DN, and as
// soon as both are set a common clear returns both to 0. A leading reference
// therefore produces UP pulses whose width is the phase error, a leading
// feedback produces DN pulses, and a frequency difference leaves one output
// asserted for most of the period (continuous charge or discharge). Both
// true and inverted outputs are provided because the charge pump's
// current-steering switches need both polarities.
//
// The detector follows the sequential phase/frequency logic of the design
// (two set/reset latches and a reset gate). It is written here as two
// edge-set flip-flops with an asynchronous common clear, which has the same
// behaviour and no combinational loop. The reset-path delay that removes the
// dead zone in silicon is a transistor-level timing property; in zero-delay
// simulation the UP/DN overlap has zero width. rst_n is an added global reset.
//
// Timing: fully asynchronous, outputs change on input edges.
module pfd (
  input  logic rst_n,
  input  logic ref_in,
  input  logic fbk_in,
  output logic up,
  output logic up_b,
  output logic dn,
  output logic dn_b
);
  timeunit 1ns;
  timeprecision 1ps;

  logic clr;

  // Both outputs high means the lagging edge has arrived: clear both.
  assign clr = ~rst_n | (up & dn);

  always_ff @(posedge ref_in or posedge clr)
    if (clr) up <= 1'b0;
    else     up <= 1'b1;

  always_ff @(posedge fbk_in or posedge clr)
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;

  assign up_b = ~up;
  assign dn_b = ~dn;
endmodule
