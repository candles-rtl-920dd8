// index_gen: index-generation logic of a CANDLES PE.
//
// Runs beside the multiplier array and gives, for each of the 16 products of a
// cycle, the 11-bit tag of the output neuron it belongs to, plus a valid bit.
//   1. The activation group's hybrid run-length metadata is expanded into four
//      absolute pixel positions: p0 = first_idx, p(i) = p(i-1) + zrun(i-1) + 1.
//   2. Each position p = ty*7 + tx inside the 7x4 tile is split into (tx, ty).
//   3. Each weight's 4-bit absolute index {r, s} shifts the pixel to its output
//      neuron: ox = tx - s + pad, oy = ty - r + pad (stride 1).
//   4. Kernel k = 4*kg + f and output pixel q = oy*7 + ox give
//      bank = {f, q[2:0]}, entry = {kg, q[4:3]}, tag = {bank, entry}.
// A product is valid when both operands are present and the output neuron falls in
// the tile; products whose neuron lies outside the tile (a feature-map boundary or a
// halo of a larger kernel) are flagged in out_of_tile and not accumulated.
// Combinational. The 11-bit tag split (5 bank + 6 entry bits), the 5-bit absolute and
// 4-bit run-length activation indices and the 4-bit kernel index follow the
// published design; the neuron-to-bank mapping and the {r,s} bit split are this
// design's own.
module index_gen
  import candles_pkg::*;
(
  input  act_group_t              grp,
  input  wt_entry_t               wts,
  input  logic [3:0]              kg,      // kernel group (kernels 4kg..4kg+3)
  input  logic [1:0]              pad,     // output shift for same-size convolutions
  output logic [3:0][3:0]         valid,   // [f][i]
  output logic [3:0][3:0][TAG_BITS-1:0] tag,
  output logic [3:0][3:0]         out_of_tile
);
  logic [6:0] pos [4];
  logic signed [5:0] tx [4];
  logic signed [5:0] ty [4];
  logic signed [5:0] ox, oy;
  logic [4:0] q;

  always_comb begin
    pos[0] = {2'b0, grp.first_idx};
    for (int i = 1; i < 4; i++)
      pos[i] = pos[i-1] + 7'(grp.zrun[i-1]) + 7'd1;
    for (int i = 0; i < 4; i++) begin
      ty[i] = 6'(pos[i] / 7'(TILE_W));
      tx[i] = 6'(pos[i] % 7'(TILE_W));
    end
    for (int f = 0; f < 4; f++) begin
      for (int i = 0; i < 4; i++) begin
        ox = tx[i] - 6'(wts[f].idx[1:0]) + 6'(pad);
        oy = ty[i] - 6'(wts[f].idx[3:2]) + 6'(pad);
        q  = 5'(oy * 6'(TILE_W) + ox);
        tag[f][i] = {2'(f), q[2:0], kg, q[4:3]};
        valid[f][i] = 1'b0;
        out_of_tile[f][i] = 1'b0;
        if (grp.valid[i] && wts[f].valid && pos[i] < 7'(TILE_PIX)) begin
          if (ox >= 0 && ox < 6'(TILE_W) && oy >= 0 && oy < 6'(TILE_H))
            valid[f][i] = 1'b1;
          else
            out_of_tile[f][i] = 1'b1;
        end
      end
    end
  end
endmodule
