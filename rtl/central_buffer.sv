// central_buffer: the 640 KB buffer shared by all PEs, on the west edge of the mesh.
//
// 65536 words of 80 bits. It has two jobs:
//   - activation refill: a PE sends an ACTREQ flit naming an activation slice; the
//     request waits in a 64-deep FIFO and is then answered with 64 ACT flits, one
//     activation group per channel, read from word act_base + {pe, slice, channel}
//     (pe = 8*y + x). Flits leave on the row of the requesting PE.
//   - result aggregation: a RESULT flit adds its 24-bit partial sum into bits
//     [23:0] of the word it names (read-modify-write); this is where sums over the
//     positions of a larger kernel and over PE pairs meet.
// Each row port has a one-flit holding register (in_ready = register empty); one
// held flit per cycle is taken, chosen round-robin over the rows.
// The host port (wr_*) writes words, the read port (rd_*) returns a word one cycle
// after its address and serves the PPU and the host. The host writes only while no
// job runs. idle is high when no flit is held and no request is queued or being answered.
// 640 KB, the 80-bit width and the role of the buffer follow the published design;
// the word layout, the request protocol and the single array standing for what
// would be several banked SRAM macros are this design's own.
module central_buffer
  import candles_pkg::*;
#(
  parameter int DEPTH  = 65536,
  parameter int NROW   = 8,
  parameter int REQ_DEPTH = 64,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [AW-1:0]        act_base,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  logic [CB_WORD_W-1:0] wr_data,
  input  logic [AW-1:0]        rd_addr,
  output logic [CB_WORD_W-1:0] rd_data,
  input  logic                 in_valid  [NROW],
  input  flit_t                in_flit   [NROW],
  output logic                 in_ready  [NROW],
  output logic                 out_valid [NROW],
  output flit_t                out_flit  [NROW],
  input  logic                 out_ready [NROW],
  output logic                 idle,
  output logic [31:0]          st_requests,
  output logic [31:0]          st_results
);
  localparam int RW = $clog2(NROW);
  localparam int QW = $clog2(REQ_DEPTH);

  logic [CB_WORD_W-1:0] mem [DEPTH];

  // request FIFO: {x, y, slice}
  logic [8:0]  rq [REQ_DEPTH];
  logic [QW:0] rq_cnt;
  logic [QW-1:0] rq_rd, rq_wr;

  // input arbitration
  logic [RW-1:0] rr;
  logic          acc_v;
  logic [RW-1:0] acc_r;
  flit_t         acc_f;
  logic          rq_full;

  assign rq_full = (rq_cnt == (QW+1)'(REQ_DEPTH));

  // one-flit holding register per row; in_ready is registered (not full)
  logic  hb_v [NROW];
  flit_t hb_f [NROW];

  logic [RW-1:0] cand [NROW];
  always_comb begin
    acc_v = 1'b0;
    acc_r = '0;
    for (int k = NROW-1; k >= 0; k--) begin
      cand[k] = RW'((int'(rr) + k) % NROW);
      if (hb_v[cand[k]] && !(hb_f[cand[k]].kind == FL_ACTREQ && rq_full)) begin
        acc_v = 1'b1;
        acc_r = cand[k];
      end
    end
    acc_f = hb_f[acc_r];
    for (int r = 0; r < NROW; r++) in_ready[r] = !hb_v[r];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NROW; r++) begin
        hb_v[r] <= 1'b0;
        hb_f[r] <= '0;
      end
    end else begin
      for (int r = 0; r < NROW; r++) begin
        if (acc_v && acc_r == RW'(r)) hb_v[r] <= 1'b0;
        if (in_valid[r] && in_ready[r]) begin
          hb_v[r] <= 1'b1;
          hb_f[r] <= in_flit[r];
        end
      end
    end
  end

  // dispatcher
  logic       disp;
  logic [2:0] d_x, d_y, d_slice;
  logic [5:0] d_ch;
  logic [AW-1:0] d_addr;
  logic       pop;

  assign d_addr = act_base + AW'({d_y, d_x, d_slice, d_ch});
  assign pop    = !disp && rq_cnt != '0;

  always_comb begin
    for (int r = 0; r < NROW; r++) begin
      out_valid[r] = disp && (d_y == 3'(r));
      out_flit[r]  = '0;
      out_flit[r].kind = FL_ACT;
      out_flit[r].dx   = d_x;
      out_flit[r].dy   = d_y;
      out_flit[r].addr = 16'(d_ch);
      out_flit[r].data = 64'(mem[d_addr][$bits(act_group_t)-1:0]);
    end
  end

  always_comb begin
    idle = !disp && rq_cnt == '0;
    for (int r = 0; r < NROW; r++) if (hb_v[r]) idle = 1'b0;
  end

  logic rq_push;
  assign rq_push = acc_v && acc_f.kind == FL_ACTREQ;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    else if (acc_v && acc_f.kind == FL_RESULT)
      mem[AW'(acc_f.addr)][PSUM_W-1:0] <= mem[AW'(acc_f.addr)][PSUM_W-1:0] + acc_f.data[PSUM_W-1:0];
    rd_data <= mem[rd_addr];
    if (rq_push) rq[rq_wr] <= {acc_f.sx, acc_f.sy, acc_f.addr[2:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0;
      rq_cnt <= '0; rq_rd <= '0; rq_wr <= '0;
      disp <= 1'b0; d_x <= '0; d_y <= '0; d_slice <= '0; d_ch <= '0;
      st_requests <= '0; st_results <= '0;
    end else begin
      if (acc_v) rr <= acc_r + 1'b1;
      if (acc_v && acc_f.kind == FL_RESULT) st_results <= st_results + 1;
      if (rq_push) rq_wr <= rq_wr + 1'b1;
      if (pop) begin
        {d_x, d_y, d_slice} <= rq[rq_rd];
        d_ch <= '0;
        disp <= 1'b1;
        rq_rd <= rq_rd + 1'b1;
        st_requests <= st_requests + 1;
      end else if (disp && out_ready[d_y]) begin
        d_ch <= d_ch + 1'b1;
        if (d_ch == 6'(CT-1)) disp <= 1'b0;
      end
      rq_cnt <= rq_cnt + (QW+1)'(rq_push) - (QW+1)'(pop);
    end
  end

  a_word_fits: assert property (@(posedge clk) disable iff (!rst_n)
    acc_v && acc_f.kind == FL_RESULT |-> 17'(acc_f.addr) < 17'(DEPTH));
endmodule
