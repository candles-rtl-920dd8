// tb_weight_buffer: fills all 1024 entries with random weight lanes (some entries
// with no valid lane), reads them back and checks every row's channel valid bitmap.
module tb_weight_buffer;
  import candles_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [9:0] wr_addr = 0, rd_addr = 0;
  logic [3:0] rd_row = 0;
  wt_entry_t wr_data = '0, rd_data;
  logic [63:0] row_valid;
  wt_entry_t model [1024];
  int checks = 0, failures = 0;

  weight_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 1024; a++) begin
      model[a] = wt_entry_t'({$urandom, $urandom});
      if (a % 5 == 0) for (int l = 0; l < 4; l++) model[a][l].valid = 1'b0;
      wr_en = 1; wr_addr = 10'(a); wr_data = model[a];
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int a = 0; a < 1024; a++) begin
      rd_addr = 10'(a); rd_row = 4'(a / 64); #1;
      checks += 2;
      if (rd_data != model[a]) begin failures++; $display("FAIL data %0d", a); end
      if (row_valid[a % 64] != (model[a][0].valid | model[a][1].valid | model[a][2].valid | model[a][3].valid)) begin
        failures++; $display("FAIL valid %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
