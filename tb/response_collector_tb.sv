// Self-checking testbench for response_collector. For several counts k it
// clears the register by shifting, opens a two-BIST-cycle count window
// (SEL_MODE = 0) in which it gives k CNT_CLK pulses, closes the window and
// reads six serial bits, one per BIST cycle, MSB first. The register must
// hold (-k) mod 64 after the window and the serial word must be
// (k - 1) mod 64; after six more shifts the output must read all ones
// (register cleared).
module response_collector_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic       rst_n = 1'b1, cnt_clk = 1'b0, bist_clk = 1'b0, sel_mode = 1'b1;
  logic       bist_output;
  logic [5:0] value;
  int         checks = 0, failures = 0;

  response_collector dut (.*);

  always #80 bist_clk = ~bist_clk;   // 6.25 MHz

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int k);
    logic [5:0] word;
    // at least eight shifts of zeros
    repeat (8) @(posedge bist_clk);
    #1 sel_mode = 1'b0;                        // window opens after a rising edge
    fork
      repeat (k) begin
        #(300.0 / (k + 1)) cnt_clk = 1'b1;
        #(10.0 / (k + 1))  cnt_clk = 1'b0;
      end
    join_none
    repeat (2) @(posedge bist_clk);            // 0.32 us window
    #1 sel_mode = 1'b1;
    checks++;
    if (value !== 6'((64 - k) % 64)) begin
      failures++;
      $display("FAIL k=%0d: register %0d, expected %0d", k, value, (64 - k) % 64);
    end
    for (int b = 5; b >= 0; b--) begin
      word[b] = bist_output;
      @(posedge bist_clk);
      #2;
    end
    checks++;
    if (word !== 6'((k + 63) % 64)) begin
      failures++;
      $display("FAIL k=%0d: serial word %0d, expected %0d", k, word, (k + 63) % 64);
    end
    checks++;
    if (value !== 6'd0 || bist_output !== 1'b1) begin
      failures++;
      $display("FAIL k=%0d: register not cleared after shift-out (%0d)", k, value);
    end
  endtask

  initial begin
    #10 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    measure(27);   // about 84 MHz for 0.32 us
    measure(24);
    measure(1);
    measure(13);
    measure(34);   // 105 MHz, top of the oscillator band
    measure(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
