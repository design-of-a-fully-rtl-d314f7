// Self-checking testbench for pfd: walks the detector through reference
// lead, feedback lead, repeated edges of one input (frequency error) and
// simultaneous edges, checking UP/DN and their complements after each step.
module pfd_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic rst_n = 1'b1, ref_in = 1'b0, fbk_in = 1'b0;
  logic up, up_b, dn, dn_b;
  int   checks = 0, failures = 0;

  pfd dut (.*);

  task automatic expect_out(input logic e_up, input logic e_dn, input string what);
    #1;
    checks++;
    if (up !== e_up || dn !== e_dn || up_b !== ~e_up || dn_b !== ~e_dn) begin
      failures++;
      $display("FAIL %s: up=%0b dn=%0b up_b=%0b dn_b=%0b, expected up=%0b dn=%0b",
               what, up, dn, up_b, dn_b, e_up, e_dn);
    end
  endtask

  task automatic pulse_ref();  ref_in = 1'b1; #5; ref_in = 1'b0; endtask
  task automatic pulse_fbk();  fbk_in = 1'b1; #5; fbk_in = 1'b0; endtask

  initial begin
    #100;
    checks++; failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #1;
    expect_out(0, 0, "reset");
    rst_n = 1'b1;
    expect_out(0, 0, "idle after reset");
    pulse_ref();  expect_out(1, 0, "reference leads: UP");
    pulse_ref();  expect_out(1, 0, "second reference edge keeps UP");
    pulse_fbk();  expect_out(0, 0, "feedback edge clears both");
    pulse_fbk();  expect_out(0, 1, "feedback leads: DN");
    pulse_fbk();  expect_out(0, 1, "second feedback edge keeps DN");
    pulse_ref();  expect_out(0, 0, "reference edge clears both");
    ref_in = 1'b1; fbk_in = 1'b1;
    expect_out(0, 0, "simultaneous edges: idle");
    ref_in = 1'b0; fbk_in = 1'b0;
    expect_out(0, 0, "falling edges ignored");
    pulse_ref();  expect_out(1, 0, "UP again");
    rst_n = 1'b0;
    expect_out(0, 0, "reset clears UP");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
