// Self-checking testbench for the vco model: frequency, measured by
// counting rising edges over 10 us, at five control voltages. Expected
// values: 70 MHz + 46.15 MHz/V * vctrl, limited to 30..105 MHz.
module vco_tb;
  timeunit 1ns;
  timeprecision 1ps;

  real  vctrl = 0.0;
  logic vco_out;
  int   checks = 0, failures = 0;
  int   edges;

  vco dut (.*);

  always @(posedge vco_out) edges++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v[5]     = '{-0.65, 0.0, 0.65, -1.5, 1.5};
    real f_exp[5] = '{40.0, 70.0, 100.0, 30.0, 105.0};
    foreach (v[i]) begin
      vctrl = v[i];
      #1000;
      edges = 0;
      #10000;
      checks++;
      if (edges < int'(f_exp[i] * 10.0) - 2 || edges > int'(f_exp[i] * 10.0) + 2) begin
        failures++;
        $display("FAIL vctrl=%f: %0d edges in 10 us, expected %0d", v[i], edges, int'(f_exp[i] * 10.0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
