// ppu: post-processing unit next to the central buffer.
//
// After a layer's partial sums have been aggregated in the central buffer, the PPU
// reads count words starting at base, one per cycle (the buffer answers one cycle
// after the address), and for each 24-bit sum v:
//   - applies ReLU when relu_en (negative sums become 0);
//   - pools: takes the maximum over windows of 1, 2 or 4 consecutive words
//     (pool_len = 0, 1, 2);
//   - requantises: arithmetic shift right by shift, saturated to 8 signed bits;
//   - compresses: emits (out_idx, out_val) only for non-zero results, where out_idx
//     counts windows from 0. The output stream has no back-pressure.
// done pulses for one cycle after the last window. ReLU, pooling and the production
// of a compressed output map follow the published design; the 1-D pooling window,
// the requantisation and the stream format are this design's own.
module ppu
  import candles_pkg::*;
#(
  parameter int AW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [AW-1:0]        base,
  input  logic [AW-1:0]        count,
  input  logic                 relu_en,
  input  logic [1:0]           pool_len,
  input  logic [4:0]           shift,
  output logic [AW-1:0]        rd_addr,
  input  logic [CB_WORD_W-1:0] rd_data,
  output logic                 busy,
  output logic                 out_valid,
  output logic [AW-1:0]        out_idx,
  output logic [7:0]           out_val,
  output logic                 done
);
  logic [AW-1:0] n_issued, n_done, win_idx;
  logic          rd_v;
  logic [2:0]    win_pos;
  psum_t         win_max;
  psum_t         v, m, q;
  logic [2:0]    win_n;

  assign win_n   = 3'd1 << pool_len;
  assign rd_addr = base + n_issued;

  always_comb begin
    v = psum_t'(rd_data[PSUM_W-1:0]);
    if (relu_en && v < 0) v = '0;
    m = (win_pos == 3'd0 || v > win_max) ? v : win_max;
    q = m >>> shift;
    if (q > 127) q = 127;
    else if (q < -128) q = -128;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; rd_v <= 1'b0;
      n_issued <= '0; n_done <= '0; win_idx <= '0; win_pos <= '0; win_max <= '0;
      out_valid <= 1'b0; out_idx <= '0; out_val <= '0; done <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        n_issued <= '0; n_done <= '0; win_idx <= '0; win_pos <= '0;
      end else if (busy) begin
        rd_v <= (n_issued != count);
        if (n_issued != count) n_issued <= n_issued + 1'b1;
        if (rd_v) begin
          n_done <= n_done + 1'b1;
          if (win_pos == win_n - 3'd1 || n_done + 1'b1 == count) begin
            win_pos <= '0;
            win_idx <= win_idx + 1'b1;
            if (q != '0) begin
              out_valid <= 1'b1;
              out_idx   <= win_idx;
              out_val   <= q[7:0];
            end
            if (n_done + 1'b1 == count) begin
              busy <= 1'b0;
              done <= 1'b1;
              rd_v <= 1'b0;
            end
          end else begin
            win_pos <= win_pos + 1'b1;
            win_max <= m;
          end
        end
      end
    end
  end
endmodule
