// tb_index_gen: random activation groups (built from sorted pixel positions, then
// run-length encoded) and random weight positions, with pad 0 and 1. The expected
// tag, valid and out-of-tile bits are computed from the pixel positions directly.
module tb_index_gen;
  import candles_pkg::*;
  act_group_t grp;
  wt_entry_t wts;
  logic [3:0] kg;
  logic [1:0] pad;
  logic [3:0][3:0] valid, out_of_tile;
  logic [3:0][3:0][10:0] tag;
  int checks = 0, failures = 0, n_oot = 0, n_valid = 0;

  index_gen dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int pos [4];
      int p;
      p = $urandom % 10;
      for (int i = 0; i < 4; i++) begin
        pos[i] = p;
        p = p + 1 + ($urandom % 6);
      end
      grp = '0;
      grp.first_idx = 5'(pos[0]);
      for (int i = 1; i < 4; i++) grp.zrun[i-1] = 4'(pos[i] - pos[i-1] - 1);
      for (int i = 0; i < 4; i++) begin
        grp.valid[i] = (pos[i] < 28) && ($urandom % 8 != 0);
        grp.val[i] = act_t'($urandom);
      end
      for (int f = 0; f < 4; f++) begin
        wts[f].valid = ($urandom % 8 != 0);
        wts[f].idx = {2'($urandom % 3), 2'($urandom % 3)};
        wts[f].val = wt_t'($urandom);
      end
      kg = 4'($urandom);
      pad = 2'(t % 2);
      #1;
      for (int f = 0; f < 4; f++)
        for (int i = 0; i < 4; i++) begin
          int tx, ty, ox, oy, q;
          logic ev, eo;
          logic [10:0] et;
          tx = pos[i] % 7; ty = pos[i] / 7;
          ox = tx - int'(wts[f].idx[1:0]) + int'(pad);
          oy = ty - int'(wts[f].idx[3:2]) + int'(pad);
          q = oy * 7 + ox;
          ev = 0; eo = 0;
          if (grp.valid[i] && wts[f].valid) begin
            if (ox >= 0 && ox < 7 && oy >= 0 && oy < 4) ev = 1; else eo = 1;
          end
          et = 11'((f << 9) | ((q % 8) << 6) | (int'(kg) << 2) | (q / 8));
          n_oot += int'(eo); n_valid += int'(ev);
          checks++;
          if (valid[f][i] != ev || out_of_tile[f][i] != eo || (ev && tag[f][i] != et)) begin
            failures++;
            $display("FAIL t=%0d f=%0d i=%0d pos=%0d v=%b/%b o=%b/%b tag=%h/%h",
                     t, f, i, pos[i], valid[f][i], ev, out_of_tile[f][i], eo, tag[f][i], et);
          end
        end
    end
    checks++;
    if (n_oot == 0 || n_valid == 0) begin failures++; $display("FAIL coverage"); end
    $display("valid=%0d out_of_tile=%0d", n_valid, n_oot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
