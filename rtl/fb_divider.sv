// Feedback divider that doubles as the BIST controller.
//
// STAGES asynchronous toggle stages (D = ~Q) form a ripple counter. Stage 0
// (A) is clocked by clk_in and every further stage by the Q output of the
// stage before it, so the six-bit state {F,E,D,C,B,A} counts down by one on
// each rising clk_in edge: 0, 63, 62, ... The fifth stage (E) toggles every
// 16 input cycles, giving fbk = clk_in / 32, the synthesizer's N = 32. The
// sixth stage (F) is only needed by the BIST, whose controller steps
// through all 64 states, one per 6.25 MHz BIST clock cycle (10.24 us per
// test cycle).
//
// Stage cells, their chaining and the N = 32 tap follow the design; the
// counting direction follows from clocking each stage by the previous Q.
// rst_n is an added asynchronous reset to state 0.
//
// Timing: ripple; stage k settles k flip-flop delays after the clk_in edge.
module fb_divider #(
  parameter int unsigned STAGES    = 6,
  parameter int unsigned FBK_STAGE = 4
) (
  input  logic              rst_n,
  input  logic              clk_in,
  output logic [STAGES-1:0] state,
  output logic              fbk
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [STAGES-1:0] stage_clk;

  assign stage_clk = {state[STAGES-2:0], clk_in};

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    logic q;

    always_ff @(posedge stage_clk[k] or negedge rst_n)
      if (!rst_n) q <= 1'b0;
      else        q <= ~q;

    assign state[k] = q;
  end

  assign fbk = state[FBK_STAGE];
endmodule
