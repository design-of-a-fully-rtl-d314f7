// Self-checking testbench for fb_divider: the six-stage state must count
// down by one per input edge from reset, fbk must be the input divided by
// 32 (period of 32 input cycles, 50 % duty), and the state must repeat
// every 64 cycles (one 10.24 us BIST cycle at 6.25 MHz).
module fb_divider_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic       rst_n = 1'b1, clk_in = 1'b0;
  logic [5:0] state;
  logic       fbk;
  int         checks = 0, failures = 0;

  fb_divider dut (.*);

  always #80 clk_in = ~clk_in;   // 6.25 MHz

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_state = 0;
    int fbk_rises = 0, last_rise = -1, period_ok = 1;
    logic fbk_prev;
    #10 rst_n = 1'b0;
    #20;
    checks++;
    if (state !== 6'd0) begin failures++; $display("FAIL reset state %0d", state); end
    rst_n = 1'b1;
    fbk_prev = fbk;
    for (int n = 1; n <= 200; n++) begin
      @(posedge clk_in);
      #5;
      exp_state = (exp_state + 63) % 64;
      checks++;
      if (state !== 6'(exp_state)) begin
        failures++;
        $display("FAIL cycle %0d: state %0d, expected %0d", n, state, exp_state);
      end
      if (fbk && !fbk_prev) begin
        if (last_rise >= 0 && n - last_rise != 32) period_ok = 0;
        last_rise = n;
        fbk_rises++;
      end
      fbk_prev = fbk;
      if (n == 64 || n == 128) begin
        checks++;
        if (state !== 6'd0) begin failures++; $display("FAIL no wrap at cycle %0d", n); end
      end
    end
    checks++;
    if (!period_ok || fbk_rises != 7) begin
      failures++;
      $display("FAIL fbk: %0d rising edges in 200 cycles, period ok=%0d", fbk_rises, period_ok);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
