// tb_act_buffer: writes a slice of random activation groups (some empty), checks the
// stored groups and the per-channel valid bits, then checks that clear empties them.
module tb_act_buffer;
  import candles_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0;
  logic [5:0] wr_addr = 0, rd_addr = 0;
  act_group_t wr_data = '0, rd_data;
  logic [63:0] chan_valid;
  act_group_t model [64];
  int checks = 0, failures = 0;

  act_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 64; c++) begin
      model[c] = act_group_t'({$urandom, $urandom});
      if (c % 3 == 0) model[c].valid = '0;
      wr_en = 1; wr_addr = 6'(c); wr_data = model[c];
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int c = 0; c < 64; c++) begin
      rd_addr = 6'(c); #1;
      checks += 2;
      if (rd_data != model[c]) begin failures++; $display("FAIL data ch %0d", c); end
      if (chan_valid[c] != (model[c].valid != 0)) begin failures++; $display("FAIL valid ch %0d", c); end
    end
    clear = 1; @(posedge clk); #1; clear = 0;
    checks++;
    if (chan_valid != 0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
