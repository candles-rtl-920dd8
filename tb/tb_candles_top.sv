// tb_candles_top: end-to-end test of the whole accelerator on a reduced 4x2 PE array.
//
// Every PE gets random sparse weights and activations. PEs are paired along each row:
// even columns are reduction receivers, odd columns senders. Pair p writes its tile
// into output region p mod (pairs/2), so every region collects four PEs: two through
// the inter-PE reduction and two more through aggregation in the central buffer.
// Even rows use 1x1 kernels (16 kernel groups), odd rows 3x3 kernels with padding
// (2 weight passes x 8 kernel groups); every PE works through 2 activation slices.
// After done, every output word is read back and compared with the reference
// model; then the PPU runs ReLU, 2:1 pooling and compression over region 0 and its
// stream is compared with a model. Each mechanism must be seen at least once:
// PSUM-filter hits and misses, bank-conflict stalls, channel skipping, out-of-tile
// drops, activation refills, neighbour reduction, central-buffer aggregation, ReLU
// zeroing and zero suppression in the PPU.
module tb_candles_top;
  import candles_pkg::*;
  import candles_tb_pkg::*;

  localparam int NX = 4, NY = 2;
  localparam int NPE = NX * NY;
  localparam int NPAIR = NPE / 2;
  localparam int NREG = (NPAIR > 1) ? NPAIR / 2 : 1;
  localparam logic [15:0] OUT0 = 16'h8000;

  logic clk = 0, rst_n = 0;
  logic ld_en = 0, ld_is_cfg = 0;
  logic [$clog2(NPE)-1:0] ld_pe = 0;
  logic [9:0] ld_addr = 0;
  logic [63:0] ld_data = 0;
  logic cb_wr_en = 0;
  logic [15:0] cb_wr_addr = 0, cb_rd_addr = 0, act_base = 0;
  logic [79:0] cb_wr_data = 0, cb_rd_data;
  logic [NPE-1:0] pe_en = 0;
  logic start = 0, busy, done;
  logic ppu_start = 0, ppu_relu = 1, ppu_busy, ppu_out_valid, ppu_done;
  logic [15:0] ppu_base = OUT0, ppu_count = 2048, ppu_out_idx;
  logic [1:0] ppu_pool = 1;
  logic [4:0] ppu_shift = 6;
  logic [7:0] ppu_out_val;
  logic [31:0] st_hits, st_misses, st_products, st_conflict_stalls, st_skipped_ch, st_oot;
  logic [31:0] st_cb_requests, st_cb_results, st_pe_cycles;

  candles_top #(.NX(NX), .NY(NY)) dut (.*);
  always #5 clk = ~clk;

  act_group_t g [8][64];
  wt_entry_t  w [1024];
  tile_sums_t regs [NREG];
  int exp_idx [$], exp_val [$];
  int checks = 0, failures = 0;
  int n_oot = 0, n_relu_zero = 0, n_suppressed = 0, n_ppu_out = 0, n_multi_region = 0;
  longint cyc = 0, run_cycles = 0;

  always @(posedge clk) cyc++;

  initial begin
    #1000000; failures++;  // 100k cycles, about three times a full run
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ppu_out_valid) begin
    n_ppu_out++;
    checks++;
    if (exp_idx.size() == 0) begin failures++; $display("FAIL extra PPU output idx %0d val %0d", ppu_out_idx, $signed(ppu_out_val)); end
    else begin
      int ei, ev;
      ei = exp_idx.pop_front(); ev = exp_val.pop_front();
      if (int'(ppu_out_idx) != ei || int'($signed(ppu_out_val)) != ev) begin
        failures++; $display("FAIL PPU idx %0d/%0d val %0d/%0d", ppu_out_idx, ei, $signed(ppu_out_val), ev);
      end
    end
  end

  initial begin
    for (int r = 0; r < NREG; r++) for (int k = 0; k < 64; k++) for (int q = 0; q < 28; q++) regs[r][k][q] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (70) @(posedge clk);
    // load every PE and its activations
    for (int y = 0; y < NY; y++)
      for (int x = 0; x < NX; x++) begin
        pe_cfg_t cfg;
        int pe, pair, region;
        bit k3;
        pe = y * NX + x; pair = pe / 2; region = pair % NREG;
        k3 = (y % 2 == 1);
        cfg = '0;
        cfg.n_slices = 2;
        cfg.n_wpos = k3 ? 5'd2 : 5'd1;
        cfg.n_kg   = k3 ? 5'd8 : 5'd16;
        cfg.pad    = k3 ? 2'd1 : 2'd0;
        cfg.role   = (x % 2 == 0) ? ROLE_RECV : ROLE_SEND;
        cfg.out_base = OUT0 + 16'(region * 2048);
        for (int s = 0; s < 8; s++) for (int c = 0; c < 64; c++) g[s][c] = gen_group(30, 4);
        for (int a = 0; a < 1024; a++) w[a] = gen_wentry(60, k3);
        n_oot += ref_tile(g, w, cfg, regs[region]);
        for (int a = 0; a < 1024; a++) begin
          @(negedge clk);
          ld_en = 1; ld_is_cfg = 0; ld_pe = $bits(ld_pe)'(pe); ld_addr = 10'(a); ld_data = 64'(w[a]);
        end
        @(negedge clk);
        ld_is_cfg = 1; ld_data = 64'(cfg);
        for (int s = 0; s < 2; s++)
          for (int c = 0; c < 64; c++) begin
            @(negedge clk);
            ld_en = 0; ld_is_cfg = 0;
            cb_wr_en = 1; cb_wr_addr = act_base + 16'({3'(y), 3'(x), 3'(s), 6'(c)}); cb_wr_data = 80'(g[s][c]);
          end
        @(negedge clk);
        cb_wr_en = 0;
      end
    // clear the output regions
    for (int a = 0; a < NREG * 2048; a++) begin
      @(negedge clk);
      cb_wr_en = 1; cb_wr_addr = OUT0 + 16'(a); cb_wr_data = '0;
    end
    @(negedge clk);
    cb_wr_en = 0;
    pe_en = '1;
    start = 1;
    @(negedge clk);
    start = 0;
    run_cycles = cyc;
    wait (done);
    run_cycles = cyc - run_cycles;
    repeat (3) @(negedge clk);
    // compare every output word
    for (int r = 0; r < NREG; r++)
      for (int k = 0; k < 64; k++)
        for (int q = 0; q < 32; q++) begin
          int e;
          e = (q < 28) ? regs[r][k][q] : 0;
          cb_rd_addr = OUT0 + 16'(r * 2048 + k * 32 + q);
          @(negedge clk);
          checks++;
          if (int'(psum_t'(cb_rd_data[23:0])) != e) begin
            failures++;
            if (failures < 10) $display("FAIL region %0d k=%0d q=%0d got %0d exp %0d", r, k, q, psum_t'(cb_rd_data[23:0]), e);
          end
        end
    // PPU over region 0
    for (int s = 0; s < 2048; s += 2) begin
      int m, qv;
      for (int j = 0; j < 2; j++) begin
        int v, k, q;
        k = (s + j) / 32; q = (s + j) % 32;
        v = (q < 28) ? regs[0][k][q] : 0;
        if (v < 0) begin v = 0; n_relu_zero++; end
        if (j == 0 || v > m) m = v;
      end
      qv = m >>> 6;
      if (qv > 127) qv = 127;
      if (qv != 0) begin exp_idx.push_back(s / 2); exp_val.push_back(qv); end
      else n_suppressed++;
    end
    @(negedge clk) ppu_start = 1;
    @(negedge clk) ppu_start = 0;
    wait (ppu_done);
    repeat (3) @(negedge clk);
    checks++;
    if (exp_idx.size() != 0) begin failures++; $display("FAIL %0d PPU outputs missing", exp_idx.size()); end
    // mechanisms
    for (int r = 0; r < NREG; r++) if (NPAIR > NREG) n_multi_region++;
    $display("cycles=%0d slowest_pe=%0d products=%0d hits=%0d misses=%0d conflict_stalls=%0d skipped_ch=%0d oot=%0d",
             run_cycles, st_pe_cycles, st_products, st_hits, st_misses, st_conflict_stalls, st_skipped_ch, st_oot);
    $display("cb_requests=%0d cb_results=%0d ppu_out=%0d relu_zeroed=%0d suppressed=%0d utilisation=%0d%%",
             st_cb_requests, st_cb_results, n_ppu_out, n_relu_zero, n_suppressed,
             (st_products * 100) / (st_pe_cycles * NPE * 16));
    checks += 11;
    if (st_hits == 0)            begin failures++; $display("FAIL no filter hit"); end
    if (st_misses == 0)          begin failures++; $display("FAIL no filter miss"); end
    if (st_conflict_stalls == 0) begin failures++; $display("FAIL no bank-conflict stall"); end
    if (st_skipped_ch == 0)      begin failures++; $display("FAIL no channel skipped"); end
    if (int'(st_oot) != n_oot || n_oot == 0) begin failures++; $display("FAIL out-of-tile %0d exp %0d", st_oot, n_oot); end
    if (st_cb_requests != 32'(NPE * 2)) begin failures++; $display("FAIL refills %0d", st_cb_requests); end
    if (st_hits + st_misses != st_products) begin failures++; $display("FAIL hits+misses"); end
    if (n_multi_region == 0)     begin failures++; $display("FAIL no central aggregation"); end
    if (n_relu_zero == 0)        begin failures++; $display("FAIL no ReLU zeroing"); end
    if (n_suppressed == 0)       begin failures++; $display("FAIL no zero suppression"); end
    if (n_ppu_out == 0)          begin failures++; $display("FAIL no PPU output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
