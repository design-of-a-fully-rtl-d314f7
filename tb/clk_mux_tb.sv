// Self-checking testbench for clk_mux: all eight input combinations.
module clk_mux_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic sel_normal, vco_clk, bist_clk, clk_out;
  int   checks = 0, failures = 0;

  clk_mux dut (.*);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_out;
      {sel_normal, vco_clk, bist_clk} = 3'(v);
      #1;
      if (sel_normal) exp_out = vco_clk;
      else            exp_out = bist_clk;
      checks++;
      if (clk_out !== exp_out) begin
        failures++;
        $display("FAIL sel=%0b vco=%0b bist=%0b -> %0b", sel_normal, vco_clk, bist_clk, clk_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
