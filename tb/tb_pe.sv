// tb_pe: one PE (column 1, row 0) with the testbench standing in for the mesh.
// The testbench answers ACTREQ flits with the 64 ACT flits of the requested slice,
// collects RESULT and PSUM flits, and plays the neighbour in the reduction. Jobs:
//   1. 1x1 kernels, 16 kernel groups, 2 slices, role alone;
//   2. 3x3 kernels (pad 1), 2 weight passes x 8 kernel groups, 3 slices, role alone;
//   3. as job 1 but role receiver: after GO the testbench sends all 1792 partial
//      sums of a fake neighbour, which must be added in;
//   4. role sender: the PE must wait for GO, then stream all 1792 partial sums west.
// Each job's outputs are compared with the reference model, as are the product and
// out-of-tile counts. Compute time is checked against its lower bound (one cycle per
// non-skipped channel plus one per conflict stall) and the hit/miss counts must add
// up to the products.
module tb_pe;
  import candles_pkg::*;
  import candles_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ld_en = 0, ld_is_cfg = 0, start = 0, busy, done;
  logic [9:0] ld_addr = 0;
  logic [63:0] ld_data = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  flit_t in_flit = '0, out_flit;
  logic [31:0] st_hits, st_misses, st_products, st_conflict_stalls, st_skipped_ch, st_oot, st_cycles;

  pe #(.X(1), .Y(0)) dut (.*);
  always #5 clk = ~clk;

  act_group_t g [8][64];
  wt_entry_t  w [1024];
  tile_sums_t exp_s, got_s, nb_s;
  pe_cfg_t    cfg;
  flit_t      txq [$];
  int checks = 0, failures = 0;
  int n_psum_out = 0, n_go_seen = 0, n_req = 0;
  bit send_nb = 0;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // network model
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      case (out_flit.kind)
        FL_ACTREQ: begin
          n_req++;
          for (int c = 0; c < 64; c++) begin
            flit_t f;
            f = '0; f.kind = FL_ACT; f.dx = 1; f.dy = 0; f.addr = 16'(c);
            f.data = 64'(g[out_flit.addr[2:0]][c]);
            txq.push_back(f);
          end
        end
        FL_RESULT: begin
          int a;
          a = int'(out_flit.addr - cfg.out_base);
          got_s[a / 32][a % 32] += int'(psum_t'(out_flit.data[23:0]));
        end
        FL_PSUM: begin
          n_psum_out++;
          got_s[{out_flit.addr[5:2], out_flit.addr[10:9]}][{out_flit.addr[1:0], out_flit.addr[8:6]}] +=
            int'(psum_t'(out_flit.data[23:0]));
          if (out_flit.dx != 0) failures++;
        end
        FL_GO: begin
          n_go_seen++;
          if (out_flit.dx != 2) failures++;
          if (send_nb)
            for (int k = 0; k < 64; k++)
              for (int q = 0; q < 28; q++) begin
                flit_t f;
                f = '0; f.kind = FL_PSUM; f.dx = 1; f.addr = 16'({k[1:0], q[2:0], k[5:2], q[4:3]});
                f.data = 64'(signed'(nb_s[k][q]));
                txq.push_back(f);
              end
        end
        default: failures++;
      endcase
    end
    out_ready <= ($urandom % 5 != 0);
  end

  always @(posedge clk) begin
    if (in_valid && in_ready) void'(txq.pop_front());
  end
  always @(negedge clk) begin
    in_valid = txq.size() > 0 && ($urandom % 4 != 0);
    if (txq.size() > 0) in_flit = txq[0];
  end

  task automatic load_job(int slices, int wpos, int kgs, int padv, bit k3, pe_role_e role);
    cfg = '0;
    cfg.n_slices = 4'(slices); cfg.n_wpos = 5'(wpos); cfg.n_kg = 5'(kgs);
    cfg.pad = 2'(padv); cfg.role = role; cfg.out_base = 16'h4000;
    for (int s = 0; s < 8; s++) for (int c = 0; c < 64; c++) g[s][c] = gen_group(25, 4);
    for (int a = 0; a < 1024; a++) w[a] = gen_wentry(70, k3);
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      ld_en = 1; ld_is_cfg = 0; ld_addr = 10'(a); ld_data = 64'(w[a]);
    end
    @(negedge clk);
    ld_is_cfg = 1; ld_data = 64'(cfg);
    @(negedge clk);
    ld_en = 0; ld_is_cfg = 0;
    for (int k = 0; k < 64; k++) for (int q = 0; q < 28; q++) begin
      exp_s[k][q] = 0; got_s[k][q] = 0; nb_s[k][q] = int'($urandom % 2001) - 1000;
    end
  endtask

  task automatic run_job(string name, bit with_nb);
    int oot, issue_lb;
    oot = ref_tile(g, w, cfg, exp_s);
    if (with_nb) for (int k = 0; k < 64; k++) for (int q = 0; q < 28; q++) exp_s[k][q] += nb_s[k][q];
    send_nb = with_nb;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    fork
      begin wait (done); end
      begin
        if (cfg.role == ROLE_SEND) begin
          repeat (3000) @(posedge clk);
          checks++;
          if (done || n_psum_out != 0) begin failures++; $display("FAIL %s: sent before GO", name); end
          txq.push_back(flit_t'({FL_GO, 1'b0, 3'd1, 3'd0, 3'd2, 3'd0, 16'd0, 64'd0}));
        end
      end
    join
    repeat (5) @(posedge clk);
    for (int k = 0; k < 64; k++) for (int q = 0; q < 28; q++) begin
      checks++;
      if (got_s[k][q] != exp_s[k][q]) begin
        failures++;
        if (failures < 10) $display("FAIL %s k=%0d q=%0d got %0d exp %0d", name, k, q, got_s[k][q], exp_s[k][q]);
      end
    end
    issue_lb = 0;
    for (int s = 0; s < int'(cfg.n_slices); s++)
      for (int r = 0; r < int'(cfg.n_wpos) * int'(cfg.n_kg); r++)
        for (int c = 0; c < 64; c++)
          if (g[s][c].valid != 0 && (w[r*64+c][0].valid | w[r*64+c][1].valid | w[r*64+c][2].valid | w[r*64+c][3].valid))
            issue_lb++;
    checks += 3;
    if (int'(st_oot) != oot) begin failures++; $display("FAIL %s oot %0d exp %0d", name, st_oot, oot); end
    if (st_hits + st_misses != st_products) begin failures++; $display("FAIL %s hits+misses", name); end
    if (int'(st_cycles) < issue_lb + int'(st_conflict_stalls)) begin failures++; $display("FAIL %s cycles", name); end
    $display("%s: products=%0d hits=%0d misses=%0d stalls=%0d skipped=%0d oot=%0d cycles=%0d issue_lb=%0d",
             name, st_products, st_hits, st_misses, st_conflict_stalls, st_skipped_ch, st_oot, st_cycles, issue_lb);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (70) @(posedge clk);
    load_job(2, 1, 16, 0, 0, ROLE_ALONE);  run_job("1x1", 0);
    load_job(3, 2, 8, 1, 1, ROLE_ALONE);   run_job("3x3", 0);
    load_job(1, 1, 16, 0, 0, ROLE_RECV);   run_job("recv", 1);
    checks++;
    if (n_go_seen != 1) begin failures++; $display("FAIL GO count %0d", n_go_seen); end
    load_job(1, 1, 16, 0, 0, ROLE_SEND);   run_job("send", 0);
    checks += 2;
    if (n_psum_out != 1792) begin failures++; $display("FAIL psum count %0d", n_psum_out); end
    if (n_req != 7) begin failures++; $display("FAIL requests %0d", n_req); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
