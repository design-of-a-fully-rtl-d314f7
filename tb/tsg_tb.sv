// Self-checking testbench for tsg: all 64 controller states in both modes,
// against the lists of states in which each test line is active.
module tsg_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic [5:0] state;
  logic       normal_mode, tck_n, tfb_n, sel_mode;
  int         checks = 0, failures = 0;

  tsg dut (.*);

  function automatic bit in_list(input int s, input int list[]);
    foreach (list[i]) if (list[i] == s) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tck_states[] = '{3, 11, 15};
    int tfb_states[] = '{11, 15, 58, 62};
    int cnt_states[] = '{0, 1, 12, 13};
    int n_tck = 0, n_tfb = 0, n_cnt = 0;
    for (int m = 0; m < 2; m++) begin
      normal_mode = 1'(m);
      for (int s = 0; s < 64; s++) begin
        logic e_tck_n, e_tfb_n, e_sel;
        state = 6'(s);
        #1;
        e_tck_n = normal_mode ? 1'b1 : !in_list(s, tck_states);
        e_tfb_n = normal_mode ? 1'b1 : !in_list(s, tfb_states);
        e_sel   = !in_list(s, cnt_states);
        checks++;
        if (tck_n !== e_tck_n || tfb_n !== e_tfb_n || sel_mode !== e_sel) begin
          failures++;
          $display("FAIL mode=%0b state=%0d: tck_n=%0b tfb_n=%0b sel=%0b, expected %0b %0b %0b",
                   normal_mode, s, tck_n, tfb_n, sel_mode, e_tck_n, e_tfb_n, e_sel);
        end
        if (!normal_mode) begin
          n_tck += !tck_n;
          n_tfb += !tfb_n;
          n_cnt += !sel_mode;
        end
      end
    end
    // count window: 4 of 64 states, i.e. 2 x 0.32 us per 10.24 us test cycle
    checks++;
    if (n_tck != 3 || n_tfb != 4 || n_cnt != 4) begin
      failures++;
      $display("FAIL active-state counts tck=%0d tfb=%0d cnt=%0d", n_tck, n_tfb, n_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
