// Response collector: a frequency counter and a serial shift register in
// the same six flip-flops.
//
// While SEL_MODE = 0 the cells form a ripple counter: cell 1 is clocked by
// the PLL output (CNT_CLK) and every further cell by the Q of the cell
// before it, so the register counts down from 0 once per VCO cycle. While
// SEL_MODE = 1 the cells form a shift register clocked by SR_CLK: cell 1
// loads 0 (VSS), cell k loads cell k-1, and the last cell, inverted, is the
// serial output. Shifting runs for most of a test cycle, so six shifts
// clear the register before the next count window, and the six shifts right
// after a window put the result out most significant bit first. Counting k
// VCO edges leaves (-k) mod 64 in the cells; the inverted serial word is
// therefore (k - 1) mod 64.
//
// SR_CLK is BIST_CLK delayed by half a period (inverted). SEL_MODE changes
// just after a rising BIST_CLK edge, so with this delay the clock
// multiplexers never switch while SR_CLK is high and the first shift after
// a window is a clean edge. The design calls for a delay element on SR_CLK
// for this reason; its length is this implementation's choice. The cell
// structure, the chaining and the output inverter follow the design; rst_n
// is added.
//
// Each cell output is both the next cell's clock (count mode) and its data
// (shift mode); lint reports this as a signal used synchronously and
// asynchronously. That dual use is the point of the structure.
//
// Timing: one count window is two BIST cycles (0.32 us at 6.25 MHz); bit k
// of the result (k = 5 first) is on bist_output from the (5-k)-th falling
// BIST_CLK edge after the window until the next one.
module response_collector #(
  parameter int unsigned WIDTH = 6
) (
  input  logic             rst_n,
  input  logic             cnt_clk,
  input  logic             bist_clk,
  input  logic             sel_mode,
  output logic             bist_output,
  output logic [WIDTH-1:0] value
);
  timeunit 1ns;
  timeprecision 1ps;

  logic sr_clk;

  assign sr_clk = ~bist_clk;

  for (genvar k = 0; k < WIDTH; k++) begin : g_cell
    if (k == 0) begin : g_first
      rc_cell u_cell (.rst_n, .a(1'b0), .b(cnt_clk), .m(sr_clk), .sel(sel_mode), .c(value[0]));
    end else begin : g_next
      rc_cell u_cell (.rst_n, .a(value[k-1]), .b(value[k-1]), .m(sr_clk), .sel(sel_mode), .c(value[k]));
    end
  end

  assign bist_output = ~value[WIDTH-1];
endmodule
