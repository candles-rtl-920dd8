// tb_ppu: a testbench memory of random signed sums answers the PPU's reads one cycle
// late. For each pooling window length and with and without ReLU, the emitted
// (index, value) pairs must match a model that applies ReLU, max-pooling, the
// shift with 8-bit saturation, and drops zeros.
module tb_ppu;
  import candles_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, relu_en = 0, busy, out_valid, done;
  logic [15:0] base = 100, count = 0, rd_addr, out_idx;
  logic [1:0] pool_len = 0;
  logic [4:0] shift = 0;
  logic [79:0] rd_data = 0;
  logic [7:0] out_val;
  int mem [512];
  int exp_idx [$], exp_val [$];
  int checks = 0, failures = 0, emitted = 0;

  ppu dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) rd_data <= 80'(24'(mem[rd_addr % 512]));

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    emitted++;
    if (exp_idx.size() == 0) begin failures++; $display("FAIL extra output"); end
    else begin
      int ei, ev;
      ei = exp_idx.pop_front(); ev = exp_val.pop_front();
      if (int'(out_idx) != ei || int'($signed(out_val)) != ev) begin
        failures++; $display("FAIL idx %0d/%0d val %0d/%0d", out_idx, ei, $signed(out_val), ev);
      end
    end
  end

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 512; a++)
      mem[a] = ($urandom % 3 == 0) ? 0 : int'($urandom % 4001) - 2000;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int mode = 0; mode < 6; mode++) begin
      int n, w, sh;
      n = 37 + mode * 11;
      w = 1 << (mode % 3);
      sh = mode + 2;
      relu_en = (mode < 4); pool_len = 2'(mode % 3); shift = 5'(sh); count = 16'(n);
      for (int s = 0; s < n; s += w) begin
        int m, q;
        m = 0;
        for (int j = 0; j < w && s + j < n; j++) begin
          int v;
          v = mem[(100 + s + j) % 512];
          if (relu_en && v < 0) v = 0;
          if (j == 0 || v > m) m = v;
        end
        q = m >>> sh;
        if (q > 127) q = 127;
        if (q < -128) q = -128;
        if (q != 0) begin exp_idx.push_back(s / w); exp_val.push_back(q); end
      end
      start = 1; @(posedge clk); #1 start = 0;
      wait (done);
      @(posedge clk); #1;
      checks++;
      if (exp_idx.size() != 0) begin failures++; $display("FAIL mode %0d: %0d outputs missing", mode, exp_idx.size()); end
      exp_idx.delete(); exp_val.delete();
    end
    $display("emitted=%0d", emitted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
