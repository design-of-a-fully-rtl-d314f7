// End-to-end testbench for pll_bist_top at its default parameters.
//
//  1. Normal mode, 1.25 MHz reference: the loop must settle at 40 MHz
//     (N = 32) within 30 us.
//  2. Reprogramming to a 2.66 MHz reference: the loop must move to 85 MHz.
//  3. BIST mode for four 10.24 us test cycles. The testbench tracks the
//     controller state itself (down-counting from the state found at the
//     mode switch), counts VCO rising edges in every SEL_MODE = 0 window and
//     compares (count - 1) mod 64 with the six serial bits that follow the
//     window. The last two test cycles must give the same readings (+-1).
//  4. Back to normal mode: the loop must lock again at 40 MHz.
//
// It also checks the BIST timing on SEL_MODE: each count window lasts
// 0.32 us and recurs every 10.24 us.
// It counts how often each mechanism occurs (charge, discharge and hold
// phases of the loop, count windows, serial read-outs, simultaneous test
// edges, mode switches, reprogramming) and fails if one never does.
module pll_bist_top_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic rst_n = 1'b1, ref_clk = 1'b0, bist_clk = 1'b0, start_bist = 1'b1;
  logic output_freq, bist_output;
  real  ref_half_ns = 400.0;
  int   checks = 0, failures = 0;

  pll_bist_top dut (.*);

  always #80 bist_clk = ~bist_clk;                 // 6.25 MHz BIST clock
  initial forever #(ref_half_ns) ref_clk = ~ref_clk;

  int vco_edges = 0;
  always @(posedge output_freq) vco_edges++;

  // mechanism counters
  int n_charge = 0, n_discharge = 0, n_hold = 0, n_windows = 0, n_readouts = 0;
  int n_both_edges = 0, n_mode_switch = 0, n_reprogram = 0, n_relock = 0;

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_freq(input real f_mhz, input real tol_pct, input string what);
    int  e0;
    real f;
    e0 = vco_edges;
    #8000;
    f = real'(vco_edges - e0) / 8.0;
    checks++;
    if (f < f_mhz * (1.0 - tol_pct / 100.0) || f > f_mhz * (1.0 + tol_pct / 100.0)) begin
      failures++;
      $display("FAIL %s: %f MHz, expected %f MHz", what, f, f_mhz);
    end else
      $display("%s: %f MHz (target %f MHz)", what, f, f_mhz);
  endtask

  // Lock time: first time a 2 us frequency measurement is within 1 %.
  task automatic wait_lock(input real f_mhz, input real limit_us, input string what);
    real t0, f;
    int  e0;
    bit  locked = 0;
    t0 = $realtime;
    while (!locked && $realtime - t0 < limit_us * 1000.0) begin
      e0 = vco_edges;
      #2000;
      f = real'(vco_edges - e0) / 2.0;
      if (f > f_mhz * 0.99 && f < f_mhz * 1.01) locked = 1;
    end
    checks++;
    if (!locked) begin
      failures++;
      $display("FAIL %s: no lock within %f us", what, limit_us);
    end else
      $display("%s: within 1 %% of %f MHz after %f us", what, f_mhz, ($realtime - t0) / 1000.0);
  endtask

  // BIST observation: independent model of the controller and the windows
  bit   bist_on = 0;
  int   st = 0, cycles_since_switch = 0;
  bit   in_window = 0, window_valid = 0;
  int   win_count = 0, rd_bits = 0, exp_word = 0;
  logic [5:0] rd_word;
  int   readings[$];

  function automatic bit count_state(input int s);
    return s == 0 || s == 1 || s == 12 || s == 13;
  endfunction

  always @(posedge output_freq) if (bist_on && in_window) win_count++;

  // timing of the count windows as seen on SEL_MODE: 0.32 us long, and the
  // same window recurring every 10.24 us (64 states of 160 ns)
  realtime win_open[$];
  int      n_win_timed = 0;
  always @(negedge dut.sel_mode) if (bist_on) win_open.push_back($realtime);
  always @(posedge dut.sel_mode) begin
    if (bist_on && win_open.size() > 0) begin
      realtime len;
      len = $realtime - win_open[win_open.size()-1];
      n_win_timed++;
      checks++;
      if (len < 319.0 || len > 321.0) begin
        failures++;
        $display("FAIL count window lasted %f ns, expected 320 ns", len);
      end
      if (win_open.size() > 2) begin
        realtime per;
        per = win_open[win_open.size()-1] - win_open[win_open.size()-3];
        checks++;
        if (per < 10239.0 || per > 10241.0) begin
          failures++;
          $display("FAIL test cycle %f ns, expected 10240 ns", per);
        end
      end
    end
  end

  always @(posedge bist_clk) begin
    if (bist_on) begin
      st = (st + 63) % 64;
      cycles_since_switch++;
      if (dut.up && !dut.dn) n_charge++;
      else if (dut.dn && !dut.up) n_discharge++;
      else n_hold++;
      if (count_state(st) && !in_window) begin
        in_window = 1;
        window_valid = cycles_since_switch > 8;
        win_count = int'(output_freq);
      end else if (!count_state(st) && in_window) begin
        in_window = 0;
        if (window_valid) begin
          n_windows++;
          exp_word = (win_count + 63) % 64;
          rd_bits = 6;
        end
      end
      if (rd_bits > 0) begin
        #1;
        rd_word[rd_bits-1] = bist_output;
        rd_bits--;
        if (rd_bits == 0) begin
          n_readouts++;
          checks++;
          readings.push_back(int'(rd_word));
          if (int'(rd_word) != exp_word) begin
            failures++;
            $display("FAIL BIST read-out %0d, expected %0d (%0d VCO edges)", rd_word, exp_word, win_count);
          end else
            $display("BIST read-out %0d = %06b: %0d VCO edges in 0.32 us (%f MHz)",
                     rd_word, rd_word, win_count, real'(win_count) / 0.32);
        end
      end
    end
  end

  // both test lines rising together at the PFD
  always @(posedge dut.pfd_ref) begin
    #0;
    if (bist_on && dut.pfd_fbk && !dut.up && !dut.dn) n_both_edges++;
  end

  initial begin
    #10 rst_n = 1'b0;
    #100 rst_n = 1'b1;

    // 1. START: acquire 40 MHz from the bottom of the range
    ref_half_ns = 400.0;                             // 1.25 MHz
    wait_lock(40.0, 30.0, "lock 40 MHz (1.25 MHz reference)");
    check_freq(40.0, 1.0, "normal mode 40 MHz");

    // 2. reprogramming
    ref_half_ns = 188.0;                             // 2.66 MHz
    n_reprogram++;
    wait_lock(85.1, 30.0, "lock 85 MHz (2.66 MHz reference)");
    check_freq(85.1, 1.0, "normal mode 85 MHz");

    // 3. BIST mode: switch while BIST_CLK is low so the divider sees no extra edge
    @(negedge bist_clk);
    #10;
    start_bist = 1'b0;
    n_mode_switch++;
    #1;
    st = int'(dut.u_div.state);
    bist_on = 1;
    repeat (4 * 64 + 8) @(posedge bist_clk);
    #2;
    bist_on = 0;
    checks++;
    if (readings.size() < 4) begin
      failures++;
      $display("FAIL only %0d BIST read-outs", readings.size());
    end else begin
      // the last two cycles must give the same pair of readings (+-1 count)
      int n;
      n = readings.size();
      checks++;
      if (readings[n-1] - readings[n-3] > 1 || readings[n-3] - readings[n-1] > 1 ||
          readings[n-2] - readings[n-4] > 1 || readings[n-4] - readings[n-2] > 1) begin
        failures++;
        $display("FAIL BIST readings differ between test cycles");
      end
    end

    // 4. STOP/START: back to normal mode
    ref_half_ns = 400.0;
    @(negedge bist_clk);
    start_bist = 1'b1;
    n_mode_switch++;
    wait_lock(40.0, 30.0, "relock 40 MHz after BIST");
    n_relock++;
    check_freq(40.0, 1.0, "normal mode 40 MHz after BIST");

    $display("mechanisms: charge=%0d discharge=%0d hold=%0d windows=%0d readouts=%0d both_edges=%0d mode_switches=%0d reprogram=%0d relock=%0d",
             n_charge, n_discharge, n_hold, n_windows, n_readouts, n_both_edges, n_mode_switch, n_reprogram, n_relock);
    checks++;
    if (n_win_timed < 6) begin
      failures++;
      $display("FAIL only %0d count windows timed", n_win_timed);
    end
    checks++;
    if (n_charge == 0 || n_discharge == 0 || n_hold == 0 || n_windows == 0 || n_readouts == 0 ||
        n_both_edges == 0 || n_mode_switch < 2 || n_reprogram == 0 || n_relock == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
