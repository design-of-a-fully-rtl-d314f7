// Frequency-synthesis sweep for pll_bist_top in normal mode: for each of the
// five reference frequencies 1.25, 1.72, 2.18, 2.66 and 3.125 MHz the loop
// is reset to the bottom of its range and must reach 32 x f_ref (40, 55,
// 70, 85, 100 MHz) within 1 % in less than 30 us, then hold it over a
// further 8 us measurement. The acquisition time of each is printed.
module pll_synthesis_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic rst_n = 1'b1, ref_clk = 1'b0, bist_clk = 1'b0, start_bist = 1'b1;
  logic output_freq, bist_output;
  real  ref_half_ns = 400.0;
  int   checks = 0, failures = 0;
  int   vco_edges = 0;

  pll_bist_top dut (.*);

  always #80 bist_clk = ~bist_clk;
  initial forever #(ref_half_ns) ref_clk = ~ref_clk;
  always @(posedge output_freq) vco_edges++;

  initial begin
    #600000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real f_ref[5] = '{1.25, 1.72, 2.18, 2.66, 3.125};
    foreach (f_ref[i]) begin
      real f_out, t0, f;
      int  e0;
      bit  locked;
      f_out = 32.0 * f_ref[i];
      ref_half_ns = 500.0 / f_ref[i];
      // discharge the filter to the bottom rail: start from the lowest frequency
      dut.u_lpf.vc1  = -1.5;
      dut.u_lpf.vout = -1.5;
      rst_n = 1'b0;
      #50 rst_n = 1'b1;
      t0 = $realtime;
      locked = 0;
      while (!locked && $realtime - t0 < 30000.0) begin
        e0 = vco_edges;
        #1000;
        f = real'(vco_edges - e0);
        if (f > f_out * 0.99 && f < f_out * 1.01) locked = 1;
      end
      checks++;
      if (!locked) begin
        failures++;
        $display("FAIL %f MHz: no lock in 30 us", f_out);
        continue;
      end
      $display("%f MHz from %f MHz reference: within 1 %% after %f us",
               f_out, f_ref[i], ($realtime - t0) / 1000.0);
      e0 = vco_edges;
      #8000;
      f = real'(vco_edges - e0) / 8.0;
      checks++;
      if (f < f_out * 0.99 || f > f_out * 1.01) begin
        failures++;
        $display("FAIL %f MHz: measured %f MHz", f_out, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
