// candles_tb_pkg: stimulus generation and the reference model shared by the PE and
// top-level testbenches.
//
// gen_group draws a compressed activation group: up to four distinct pixel
// positions of the 7x4 tile in increasing order with gaps of at most 16, run-length
// encoded the way the hardware expects, with non-zero values. gen_wentry draws one
// weight-buffer entry. ref_tile computes, straight from the operands, every output
// partial sum of one PE's tile (kernel k, output pixel q) and the number of products
// whose neuron falls outside the tile.
package candles_tb_pkg;
  import candles_pkg::*;

  typedef int tile_sums_t [64][28];

  function automatic act_t nz8();
    int v;
    v = int'($urandom % 255) - 127;
    if (v == 0) v = 1;
    return act_t'(v);
  endfunction

  function automatic act_group_t gen_group(int pct_empty, int max_n);
    act_group_t g;
    int p, n;
    g = '0;
    if (int'($urandom % 100) < pct_empty) return g;
    n = 1 + int'($urandom % max_n);
    p = int'($urandom % 20);
    g.first_idx = 5'(p);
    g.valid[0] = 1'b1;
    g.val[0] = nz8();
    for (int i = 1; i < n; i++) begin
      int gap;
      gap = int'($urandom % 9);
      if (p + gap + 1 > 27) break;
      p = p + gap + 1;
      g.zrun[i-1] = 4'(gap);
      g.valid[i] = 1'b1;
      g.val[i] = nz8();
    end
    return g;
  endfunction

  function automatic wt_entry_t gen_wentry(int pct_valid, bit k3x3);
    wt_entry_t e;
    for (int f = 0; f < 4; f++) begin
      e[f].valid = int'($urandom % 100) < pct_valid;
      e[f].idx   = k3x3 ? {2'($urandom % 3), 2'($urandom % 3)} : 4'd0;
      e[f].val   = e[f].valid ? wt_t'(nz8()) : '0;
    end
    return e;
  endfunction

  // Adds the partial sums of one tile job into sums; returns the out-of-tile count.
  function automatic int ref_tile(ref act_group_t g [8][64], ref wt_entry_t w [1024],
                                  input pe_cfg_t cfg, ref tile_sums_t sums);
    int oot;
    oot = 0;
    for (int s = 0; s < int'(cfg.n_slices); s++)
      for (int wp = 0; wp < int'(cfg.n_wpos); wp++)
        for (int kg = 0; kg < int'(cfg.n_kg); kg++)
          for (int c = 0; c < 64; c++) begin
            int row, pos [4];
            act_group_t a;
            wt_entry_t e;
            row = wp * int'(cfg.n_kg) + kg;
            a = g[s][c];
            e = w[row * 64 + c];
            pos[0] = int'(a.first_idx);
            for (int i = 1; i < 4; i++) pos[i] = pos[i-1] + int'(a.zrun[i-1]) + 1;
            for (int f = 0; f < 4; f++)
              for (int i = 0; i < 4; i++)
                if (a.valid[i] && e[f].valid) begin
                  int ox, oy;
                  ox = pos[i] % 7 - int'(e[f].idx[1:0]) + int'(cfg.pad);
                  oy = pos[i] / 7 - int'(e[f].idx[3:2]) + int'(cfg.pad);
                  if (ox >= 0 && ox < 7 && oy >= 0 && oy < 4)
                    sums[kg*4 + f][oy*7 + ox] += int'(a.val[i]) * int'(e[f].val);
                  else oot++;
                end
          end
    return oot;
  endfunction
endpackage
