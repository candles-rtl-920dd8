// tb_mult_array: checks the 4x4 cartesian product against products computed in the
// testbench, for corner values and 200 random operand sets.
module tb_mult_array;
  import candles_pkg::*;
  act_t act [4];
  wt_t  wt  [4];
  psum_t prod [4][4];
  int checks = 0, failures = 0;

  mult_array dut (.act, .wt, .prod);

  task automatic check_all();
    #1;
    for (int f = 0; f < 4; f++)
      for (int i = 0; i < 4; i++) begin
        int exp;
        exp = int'(act[i]) * int'(wt[f]);
        checks++;
        if (int'(prod[f][i]) != exp) begin
          failures++;
          $display("FAIL f=%0d i=%0d got %0d exp %0d", f, i, prod[f][i], exp);
        end
      end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    act = '{-128, 127, -1, 0};
    wt  = '{-128, 127, 1, -1};
    check_all();
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 4; i++) begin
        act[i] = act_t'($urandom);
        wt[i]  = wt_t'($urandom);
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
