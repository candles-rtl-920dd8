// candles_top: the CANDLES sparse CNN accelerator.
//
// An 8x8 array of PEs joined by a 2-D mesh of routers, with the 640 KB central buffer
// and the post-processing unit (PPU) on the west edge. The central buffer is attached
// to the west port of the first router of every row.
//
// Use:
//   1. Load each PE's weights and job configuration through the off-chip load port
//      (ld_*, ld_pe = 8*y + x selects the PE; ld_is_cfg selects the configuration
//      word, a candles_pkg::pe_cfg_t). This port stands for the DRAM interface.
//   2. Write the compressed activation groups into the central buffer (cb_wr_*), at
//      act_base + {pe, slice, channel}.
//   3. Pulse start with pe_en marking the PEs that take part. Each PE fetches its
//      activation slices over the mesh, computes its tile, reduces with its
//      neighbour if configured, and sends its results to the central buffer, which
//      adds them into the output words. done rises when every enabled PE has
//      finished, the network is empty and the central buffer has no request left.
//   4. Pulse ppu_start: the PPU reads the output words, applies ReLU, pooling and
//      requantisation and streams out the non-zero results with their indices.
//      While the PPU runs it owns the central buffer's read port; otherwise
//      cb_rd_addr/cb_rd_data read any word with one cycle of latency.
// The statistics outputs add up the counters of all PEs since the last start.
// The array size, the mesh, the central buffer with its PPU and the per-PE
// structure follow the published design; the ports, the control protocol and the
// placement of the central buffer on the west edge are this design's own.
module candles_top
  import candles_pkg::*;
#(
  parameter int NX = 8,
  parameter int NY = 8,
  parameter int WB_DEPTH = 1024,
  parameter int CB_DEPTH = 65536,
  localparam int NPE = NX * NY,
  localparam int PW  = $clog2(NPE),
  localparam int CAW = $clog2(CB_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // off-chip load port
  input  logic                 ld_en,
  input  logic [PW-1:0]        ld_pe,
  input  logic                 ld_is_cfg,
  input  logic [$clog2(WB_DEPTH)-1:0] ld_addr,
  input  logic [63:0]          ld_data,
  // central buffer host port
  input  logic                 cb_wr_en,
  input  logic [CAW-1:0]       cb_wr_addr,
  input  logic [CB_WORD_W-1:0] cb_wr_data,
  input  logic [CAW-1:0]       cb_rd_addr,
  output logic [CB_WORD_W-1:0] cb_rd_data,
  input  logic [CAW-1:0]       act_base,
  // job control
  input  logic [NPE-1:0]       pe_en,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  // PPU
  input  logic                 ppu_start,
  input  logic [CAW-1:0]       ppu_base,
  input  logic [CAW-1:0]       ppu_count,
  input  logic                 ppu_relu,
  input  logic [1:0]           ppu_pool,
  input  logic [4:0]           ppu_shift,
  output logic                 ppu_busy,
  output logic                 ppu_out_valid,
  output logic [CAW-1:0]       ppu_out_idx,
  output logic [7:0]           ppu_out_val,
  output logic                 ppu_done,
  // statistics
  output logic [31:0]          st_hits,
  output logic [31:0]          st_misses,
  output logic [31:0]          st_products,
  output logic [31:0]          st_conflict_stalls,
  output logic [31:0]          st_skipped_ch,
  output logic [31:0]          st_oot,
  output logic [31:0]          st_cb_requests,
  output logic [31:0]          st_cb_results,
  output logic [31:0]          st_pe_cycles     // busy cycles of the slowest PE
);
  // router port wiring: [y][x][port], ports 0=N 1=E 2=S 3=W 4=local
  logic  r_in_v  [NY][NX][5];
  flit_t r_in_f  [NY][NX][5];
  logic  r_in_r  [NY][NX][5];
  logic  r_out_v [NY][NX][5];
  flit_t r_out_f [NY][NX][5];
  logic  r_out_r [NY][NX][5];
  logic  r_idle  [NY][NX];

  logic  pe_busy [NY][NX];
  logic  pe_done [NY][NX];
  logic [31:0] s_hit [NY][NX], s_miss [NY][NX], s_prod [NY][NX], s_stall [NY][NX];
  logic [31:0] s_skip [NY][NX], s_oot [NY][NX], s_cyc [NY][NX];

  logic  cb_in_v  [NY];
  flit_t cb_in_f  [NY];
  logic  cb_in_r  [NY];
  logic  cb_out_v [NY];
  flit_t cb_out_f [NY];
  logic  cb_out_r [NY];
  logic  cb_idle;

  for (genvar y = 0; y < NY; y++) begin : g_row
    for (genvar x = 0; x < NX; x++) begin : g_col
      mesh_router #(.X(x), .Y(y)) u_r (
        .clk, .rst_n,
        .in_valid (r_in_v[y][x]), .in_flit (r_in_f[y][x]), .in_ready (r_in_r[y][x]),
        .idle     (r_idle[y][x]),
        .out_valid(r_out_v[y][x]), .out_flit(r_out_f[y][x]), .out_ready(r_out_r[y][x])
      );

      pe #(.X(x), .Y(y), .WB_DEPTH(WB_DEPTH)) u_pe (
        .clk, .rst_n,
        .ld_en     (ld_en && ld_pe == PW'(y*NX + x)),
        .ld_is_cfg (ld_is_cfg), .ld_addr (ld_addr), .ld_data (ld_data),
        .start     (start && pe_en[y*NX + x]),
        .busy      (pe_busy[y][x]), .done (pe_done[y][x]),
        .in_valid  (r_out_v[y][x][4]), .in_flit (r_out_f[y][x][4]), .in_ready (r_out_r[y][x][4]),
        .out_valid (r_in_v[y][x][4]),  .out_flit (r_in_f[y][x][4]),  .out_ready (r_in_r[y][x][4]),
        .st_hits (s_hit[y][x]), .st_misses (s_miss[y][x]), .st_products (s_prod[y][x]),
        .st_conflict_stalls (s_stall[y][x]), .st_skipped_ch (s_skip[y][x]),
        .st_oot (s_oot[y][x]), .st_cycles (s_cyc[y][x])
      );

      // north / south
      if (y > 0) begin : g_n
        assign r_in_v[y][x][0]  = r_out_v[y-1][x][2];
        assign r_in_f[y][x][0]  = r_out_f[y-1][x][2];
        assign r_out_r[y][x][0] = r_in_r[y-1][x][2];
      end else begin : g_nt
        assign r_in_v[y][x][0]  = 1'b0;
        assign r_in_f[y][x][0]  = '0;
        assign r_out_r[y][x][0] = 1'b0;
      end
      if (y < NY-1) begin : g_s
        assign r_in_v[y][x][2]  = r_out_v[y+1][x][0];
        assign r_in_f[y][x][2]  = r_out_f[y+1][x][0];
        assign r_out_r[y][x][2] = r_in_r[y+1][x][0];
      end else begin : g_st
        assign r_in_v[y][x][2]  = 1'b0;
        assign r_in_f[y][x][2]  = '0;
        assign r_out_r[y][x][2] = 1'b0;
      end
      // east / west
      if (x < NX-1) begin : g_e
        assign r_in_v[y][x][1]  = r_out_v[y][x+1][3];
        assign r_in_f[y][x][1]  = r_out_f[y][x+1][3];
        assign r_out_r[y][x][1] = r_in_r[y][x+1][3];
      end else begin : g_et
        assign r_in_v[y][x][1]  = 1'b0;
        assign r_in_f[y][x][1]  = '0;
        assign r_out_r[y][x][1] = 1'b0;
      end
      if (x > 0) begin : g_w
        assign r_in_v[y][x][3]  = r_out_v[y][x-1][1];
        assign r_in_f[y][x][3]  = r_out_f[y][x-1][1];
        assign r_out_r[y][x][3] = r_in_r[y][x-1][1];
      end else begin : g_cb
        assign r_in_v[y][x][3]  = cb_out_v[y];
        assign r_in_f[y][x][3]  = cb_out_f[y];
        assign cb_out_r[y]      = r_in_r[y][x][3];
        assign cb_in_v[y]       = r_out_v[y][x][3];
        assign cb_in_f[y]       = r_out_f[y][x][3];
        assign r_out_r[y][x][3] = cb_in_r[y];
      end
    end
  end

  // central buffer and PPU
  logic [CAW-1:0]       ppu_rd_addr;
  logic [CB_WORD_W-1:0] cb_rdata;

  central_buffer #(.DEPTH(CB_DEPTH), .NROW(NY)) u_cb (
    .clk, .rst_n,
    .act_base (act_base),
    .wr_en (cb_wr_en), .wr_addr (cb_wr_addr), .wr_data (cb_wr_data),
    .rd_addr (ppu_busy ? ppu_rd_addr : cb_rd_addr), .rd_data (cb_rdata),
    .in_valid (cb_in_v), .in_flit (cb_in_f), .in_ready (cb_in_r),
    .out_valid (cb_out_v), .out_flit (cb_out_f), .out_ready (cb_out_r),
    .idle (cb_idle),
    .st_requests (st_cb_requests), .st_results (st_cb_results)
  );
  assign cb_rd_data = cb_rdata;

  ppu #(.AW(CAW)) u_ppu (
    .clk, .rst_n,
    .start (ppu_start), .base (ppu_base), .count (ppu_count),
    .relu_en (ppu_relu), .pool_len (ppu_pool), .shift (ppu_shift),
    .rd_addr (ppu_rd_addr), .rd_data (cb_rdata),
    .busy (ppu_busy),
    .out_valid (ppu_out_valid), .out_idx (ppu_out_idx), .out_val (ppu_out_val),
    .done (ppu_done)
  );

  // completion and statistics
  always_comb begin
    logic all_done, net_idle;
    all_done = 1'b1;
    net_idle = cb_idle;
    busy = 1'b0;
    st_hits = '0; st_misses = '0; st_products = '0; st_conflict_stalls = '0;
    st_skipped_ch = '0; st_oot = '0; st_pe_cycles = '0;
    for (int y = 0; y < NY; y++)
      for (int x = 0; x < NX; x++) begin
        if (pe_en[y*NX + x] && !pe_done[y][x]) all_done = 1'b0;
        if (pe_busy[y][x]) busy = 1'b1;
        if (!r_idle[y][x]) net_idle = 1'b0;
        st_hits            += s_hit[y][x];
        st_misses          += s_miss[y][x];
        st_products        += s_prod[y][x];
        st_conflict_stalls += s_stall[y][x];
        st_skipped_ch      += s_skip[y][x];
        st_oot             += s_oot[y][x];
        if (s_cyc[y][x] > st_pe_cycles) st_pe_cycles = s_cyc[y][x];
      end
    done = all_done && net_idle && (pe_en != '0);
  end
endmodule
