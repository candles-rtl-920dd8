// tb_psum_filter: streams random updates (tags drawn mostly from a small hot set so
// both hits and capacity misses occur) into one filter backed by a testbench L2
// model that adds every eviction. A reference LRU list predicts hit/miss for each
// update. After a flush, L2 must hold the exact sum for every tag.
module tb_psum_filter;
  import candles_pkg::*;
  logic clk = 0, rst_n = 0, upd_valid = 0, flush = 0;
  logic [5:0] upd_tag = 0;
  psum_t upd_val = 0;
  logic ev_valid, hit, miss, empty;
  logic [5:0] ev_tag;
  psum_t ev_val;
  int l2 [64], total [64];
  int lru [$];
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_evict = 0;

  psum_filter dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (ev_valid) begin l2[ev_tag] += int'(ev_val); n_evict++; end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 64; e++) begin l2[e] = 0; total[e] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int tg, v, idx;
      logic exp_hit;
      tg = ((t / 500) % 2) ? int'($urandom % 64) : int'($urandom % 12);
      v = int'($urandom % 201) - 100;
      if ($urandom % 10 == 0) begin
        upd_valid = 0;
        @(posedge clk); #1;
        continue;
      end
      upd_valid = 1; upd_tag = 6'(tg); upd_val = psum_t'(v);
      idx = -1;
      foreach (lru[j]) if (lru[j] == tg) idx = j;
      exp_hit = (idx >= 0);
      if (idx >= 0) lru.delete(idx);
      else if (lru.size() == 16) void'(lru.pop_back());
      lru.push_front(tg);
      total[tg] += v;
      #1;
      checks++;
      if (hit != exp_hit || miss != !exp_hit) begin
        failures++; $display("FAIL t=%0d tag=%0d hit=%b exp %b", t, tg, hit, exp_hit);
      end
      n_hit += int'(exp_hit); n_miss += int'(!exp_hit);
      @(posedge clk); #1;
    end
    upd_valid = 0; flush = 1;
    repeat (20) @(posedge clk);
    #1 flush = 0;
    checks++;
    if (!empty) begin failures++; $display("FAIL not empty after flush"); end
    for (int e = 0; e < 64; e++) begin
      checks++;
      if (l2[e] != total[e]) begin failures++; $display("FAIL tag %0d l2=%0d exp %0d", e, l2[e], total[e]); end
    end
    $display("hits=%0d misses=%0d evictions=%0d", n_hit, n_miss, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
