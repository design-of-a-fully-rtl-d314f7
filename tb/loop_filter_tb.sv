// Self-checking testbench for the loop_filter model. A 25 uA current for
// 2 us deposits 50 pC; while it flows the node sits above
// the charge voltage Q/(C1+C2) by I*R*(C1/(C1+C2))^2, and after the current stops and
// the C1/C2 redistribution settles (time constant R*C1*C2/(C1+C2), about
// 0.18 us) the voltage is Q/(C1+C2). The same test is run with negative
// current, then a long pulse checks the rail clamp.
module loop_filter_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real C1 = 76.9e-12, C2 = 7.5e-12, R = 26.9e3, I = 25.0e-6;

  real i_in = 0.0;
  real vctrl;
  int  checks = 0, failures = 0;

  loop_filter #(.V_INIT(0.0)) dut (.*);

  task automatic expect_v(input real e, input real tol, input string what);
    checks++;
    if (vctrl > e + tol || vctrl < e - tol) begin
      failures++;
      $display("FAIL %s: %f V, expected %f V", what, vctrl, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ct;
    ct = C1 + C2;
    #100;
    expect_v(0.0, 1.0e-6, "starts at V_INIT");
    i_in = I;
    #1999;
    expect_v(I * 2.0e-6 / ct + I * R * C1 * C1 / (ct * ct), 0.01, "charging: ramp plus I*R step");
    #1;
    i_in = 0.0;
    #3000;
    expect_v(I * 2.0e-6 / ct, 0.01, "charge 50 pC");
    i_in = -I;
    #4000;
    i_in = 0.0;
    #3000;
    expect_v(-I * 2.0e-6 / ct, 0.01, "net charge -50 pC");
    i_in = 4.0 * I;
    #10000;
    expect_v(1.5, 1.0e-6, "clamped at the upper rail");
    i_in = 0.0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
