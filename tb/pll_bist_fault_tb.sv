// Defect-detection runs of the built-in self-test on pll_bist_top.
//
// Each run resets the design, presets the loop filter to 0 V (70 MHz),
// enters test mode and lets the controller run three 10.24 us test cycles,
// reading the six-bit word after every count window. The testbench tracks
// the controller state itself (down-counting from 0 after reset) to know
// when each window closes and when each serial bit is on the pin.
//
// The first run is fault-free and gives the reference words; the words of
// its last cycle must repeat those of the cycle before (+-1). Then defects
// are injected one at a time by forcing internal nets:
//   cp_dead       both charge-pump sources open
//   dn_open       charge-pump sink open (no discharge)
//   up_open       charge-pump source open (no charge)
//   vco_stuck     VCO output stuck at 0
//   ctrl_stuck    first controller stage stuck at 0
//   rc_ff3_stuck  third collector flip-flop stuck at 0
//   fbk_sw_stuck  PFD feedback input stuck at 1 (no test feedback edges)
// A defect counts as detected when a word of the last test cycle differs
// from the reference by more than one count. All but up_open must be
// detected: each removes the discharge, the counted signal or the read-out.
// For up_open the result is only reported: with this test schedule the
// charge phase is too short to lift the VCO off the bottom of its band, so
// the loop ends up in the same place with or without the defect.
module pll_bist_fault_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic rst_n = 1'b1, ref_clk = 1'b0, bist_clk = 1'b0, start_bist = 1'b1;
  logic output_freq, bist_output;
  int   checks = 0, failures = 0;

  pll_bist_top dut (.*);

  always #80  bist_clk = ~bist_clk;   // 6.25 MHz
  always #400 ref_clk  = ~ref_clk;    // 1.25 MHz, unused in test mode

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int CYCLES = 3;

  // observation state
  bit  running = 0, in_window = 0;
  int  st = 0, win_count = 0, rd_bits = 0;
  logic [5:0] rd_word;
  int  words[$];

  function automatic bit count_state(input int s);
    return s == 0 || s == 1 || s == 12 || s == 13;
  endfunction

  always @(posedge output_freq) if (running && in_window) win_count++;

  always @(posedge bist_clk) begin
    if (running) begin
      st = (st + 63) % 64;
      if (count_state(st) && !in_window) begin
        in_window = 1;
        win_count = 0;
      end else if (!count_state(st) && in_window) begin
        in_window = 0;
        rd_bits = 6;
      end
      if (rd_bits > 0) begin
        #1;
        rd_word[rd_bits-1] = bist_output;
        rd_bits--;
        if (rd_bits == 0) words.push_back(int'(rd_word));
      end
    end
  end

  // one self-test: reset, preset the filter, run CYCLES test cycles
  task automatic run_bist();
    words.delete();
    @(negedge bist_clk);
    start_bist = 1'b0;
    rst_n = 1'b0;
    dut.u_lpf.vc1  = 0.0;
    dut.u_lpf.vout = 0.0;
    #20;
    rst_n = 1'b1;
    st = 0;
    in_window = 0;
    rd_bits = 0;
    running = 1;
    repeat (CYCLES * 64 + 8) @(posedge bist_clk);
    #2;
    running = 0;
    start_bist = 1'b1;
  endtask

  function automatic bit differs(input int a[$], input int b[$]);
    int n;
    n = a.size();
    if (b.size() != n || n < 2) return 1'b1;
    for (int i = n - 2; i < n; i++)
      if (a[i] - b[i] > 1 || b[i] - a[i] > 1) return 1'b1;
    return 1'b0;
  endfunction

  function automatic string fmt(input int w[$]);
    string r = "";
    foreach (w[i]) r = {r, $sformatf(" %2d", w[i])};
    return r;
  endfunction

  int golden[$];
  int n_detected = 0, n_must = 0;

  task automatic report(input string name, input bit must_detect);
    bit det;
    det = differs(words, golden);
    n_detected += det;
    $display("%-13s words%s : %s", name, fmt(words), det ? "detected" : "not detected");
    if (must_detect) begin
      n_must++;
      checks++;
      if (!det) begin
        failures++;
        $display("FAIL %s not detected", name);
      end
    end
  endtask

  initial begin
    #1000;
    // fault-free reference
    run_bist();
    golden = words;
    $display("fault-free    words%s", fmt(golden));
    checks++;
    if (golden.size() != 2 * CYCLES) begin
      failures++;
      $display("FAIL expected %0d words, got %0d", 2 * CYCLES, golden.size());
    end else begin
      checks++;
      if (golden[2*CYCLES-1] - golden[2*CYCLES-3] > 1 || golden[2*CYCLES-3] - golden[2*CYCLES-1] > 1 ||
          golden[2*CYCLES-2] - golden[2*CYCLES-4] > 1 || golden[2*CYCLES-4] - golden[2*CYCLES-2] > 1) begin
        failures++;
        $display("FAIL fault-free words do not repeat between test cycles");
      end
    end
    // repeatability: a second fault-free run must not count as a defect
    run_bist();
    checks++;
    if (differs(words, golden)) begin
      failures++;
      $display("FAIL second fault-free run differs:%s", fmt(words));
    end

    force dut.up_b = 1'b1; force dut.dn_b = 1'b1;
    run_bist(); report("cp_dead", 1);
    release dut.up_b; release dut.dn_b;

    force dut.dn_b = 1'b1;
    run_bist(); report("dn_open", 1);
    release dut.dn_b;

    force dut.output_freq = 1'b0;
    run_bist(); report("vco_stuck", 1);
    release dut.output_freq;

    force dut.u_div.g_stage[0].q = 1'b0;
    run_bist(); report("ctrl_stuck", 1);
    release dut.u_div.g_stage[0].q;

    force dut.u_rc.g_cell[2].g_next.u_cell.c = 1'b0;
    run_bist(); report("rc_ff3_stuck", 1);
    release dut.u_rc.g_cell[2].g_next.u_cell.c;

    force dut.up_b = 1'b1;
    run_bist(); report("up_open", 0);
    release dut.up_b;

    force dut.pfd_fbk = 1'b1;
    run_bist(); report("fbk_sw_stuck", 1);
    release dut.pfd_fbk;

    $display("defects detected: %0d of 7", n_detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
