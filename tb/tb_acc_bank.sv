// tb_acc_bank: accumulates random values into random entries of one L2 bank, checks
// read-and-clear results against a testbench model, and checks that reading clears.
module tb_acc_bank;
  import candles_pkg::*;
  logic clk = 0, add_en = 0, rc_en = 0, clr_en = 0;
  logic [5:0] add_addr = 0, rc_addr = 0, clr_addr = 0;
  psum_t add_val = 0, rc_data;
  int model [64];
  int checks = 0, failures = 0;

  acc_bank dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 64; e++) begin
      clr_en = 1; clr_addr = 6'(e); model[e] = 0;
      @(posedge clk); #1;
    end
    clr_en = 0;
    for (int t = 0; t < 1000; t++) begin
      int v;
      add_en = 1; add_addr = 6'($urandom % 64);
      v = int'($urandom % 2001) - 1000;
      add_val = psum_t'(v);
      model[add_addr] += v;
      @(posedge clk); #1;
    end
    add_en = 0;
    for (int e = 0; e < 64; e++) begin
      rc_addr = 6'(e); rc_en = 1; #1;
      checks++;
      if (int'(rc_data) != model[e]) begin
        failures++; $display("FAIL entry %0d got %0d exp %0d", e, rc_data, model[e]);
      end
      @(posedge clk); #1;
      rc_en = 0; #1;
      checks++;
      if (rc_data != 0) begin failures++; $display("FAIL entry %0d not cleared", e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
