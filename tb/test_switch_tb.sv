// Self-checking testbench for test_switch: the full truth table of
// out = X&Y | ~Z, written out as a table, plus the two operating modes.
module test_switch_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic x, y, z, out;
  int   checks = 0, failures = 0;
  // expected output indexed by {x,y,z}
  localparam logic [7:0] TRUTH = 8'b1101_0101;

  test_switch dut (.*);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      checks++;
      if (out !== TRUTH[v]) begin
        failures++;
        $display("FAIL x=%0b y=%0b z=%0b -> %0b, expected %0b", x, y, z, out, TRUTH[v]);
      end
    end
    // normal mode: z held at 1, output follows y
    x = 1'b1; z = 1'b1;
    for (int v = 0; v < 2; v++) begin
      y = 1'(v); #1; checks++;
      if (out !== y) begin failures++; $display("FAIL normal mode y=%0b", y); end
    end
    // test mode: output is the complement of z whatever y is
    x = 1'b0;
    for (int v = 0; v < 4; v++) begin
      {y, z} = 2'(v); #1; checks++;
      if (out !== ~z) begin failures++; $display("FAIL test mode y=%0b z=%0b", y, z); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
