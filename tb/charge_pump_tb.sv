// Self-checking testbench for the charge_pump model: output current for
// every consistent UP/DN combination and for inconsistent complementary
// controls (source off).
module charge_pump_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic up = 1'b0, up_b = 1'b1, dn = 1'b0, dn_b = 1'b1;
  real  i_out;
  int   checks = 0, failures = 0;

  charge_pump dut (.*);

  task automatic expect_i(input real e, input string what);
    #1;
    checks++;
    if (i_out > e + 1.0e-9 || i_out < e - 1.0e-9) begin
      failures++;
      $display("FAIL %s: %e A, expected %e A", what, i_out, e);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_i(0.0, "idle");
    up = 1; up_b = 0;  expect_i(25.0e-6, "UP sources 25 uA");
    dn = 1; dn_b = 0;  expect_i(0.0, "UP and DN cancel");
    up = 0; up_b = 1;  expect_i(-25.0e-6, "DN sinks 25 uA");
    dn_b = 1;          expect_i(0.0, "DN with DN_b high is off");
    dn = 0; up = 1;    expect_i(0.0, "UP with UP_b high is off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
