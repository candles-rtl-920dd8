// psum_filter: the PSUM filter of one accumulator bank, the first level (L1) of the
// two-level accumulation buffer of a CANDLES PE.
//
// A fully associative set of 16 registers, each with a 6-bit tag naming one of the
// 64 entries of its L2 bank, a valid bit and a 24-bit partial sum. An update (one
// partial sum from the crossbar) that hits adds into its register in place. On a
// miss the update takes a free register, or else the least recently used one, whose
// contents are sent to the L2 bank in the same cycle (ev_*), where they are added
// into the entry (read-modify-write). The filter therefore holds increments that
// have not yet reached L2; the exact sum of a neuron is its L2 entry plus its filter
// register. flush evicts one valid register per cycle when no update is offered; the
// PE flushes before it reads L2 out. Both the hit path and the miss path finish in
// one cycle, so a miss costs no stall.
// Follows the published design: 16 entries, 6-bit tags, full associativity, LRU,
// single-cycle hit/miss. This design's own choice: L2 receives the evicted increment
// (an add), not a value swapped back from L2.
module psum_filter
  import candles_pkg::*;
#(
  parameter int ENTRIES = 16,
  parameter int TAG_W   = 6,
  localparam int EW     = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             upd_valid,
  input  logic [TAG_W-1:0] upd_tag,
  input  psum_t            upd_val,
  input  logic             flush,
  output logic             ev_valid,
  output logic [TAG_W-1:0] ev_tag,
  output psum_t            ev_val,
  output logic             hit,
  output logic             miss,
  output logic             empty
);
  logic [ENTRIES-1:0] vld;
  logic [TAG_W-1:0]   tags [ENTRIES];
  psum_t              data [ENTRIES];
  logic [EW-1:0]      rank [ENTRIES];   // 0 = most recently used

  logic          hit_found, free_found, any_valid;
  logic [EW-1:0] hit_idx, free_idx, lru_idx, first_valid, tgt;

  always_comb begin
    hit_found = 1'b0; hit_idx = '0;
    free_found = 1'b0; free_idx = '0;
    any_valid = 1'b0; first_valid = '0;
    lru_idx = '0;
    for (int e = ENTRIES-1; e >= 0; e--) begin
      if (vld[e] && tags[e] == upd_tag) begin hit_found = 1'b1; hit_idx = EW'(e); end
      if (!vld[e]) begin free_found = 1'b1; free_idx = EW'(e); end
      if (vld[e]) begin any_valid = 1'b1; first_valid = EW'(e); end
      if (rank[e] == EW'(ENTRIES-1)) lru_idx = EW'(e);
    end
    hit  = upd_valid && hit_found;
    miss = upd_valid && !hit_found;
    tgt  = hit_found ? hit_idx : (free_found ? free_idx : lru_idx);
    ev_valid = 1'b0; ev_tag = '0; ev_val = '0;
    if (miss && !free_found) begin
      ev_valid = 1'b1; ev_tag = tags[lru_idx]; ev_val = data[lru_idx];
    end else if (!upd_valid && flush && any_valid) begin
      ev_valid = 1'b1; ev_tag = tags[first_valid]; ev_val = data[first_valid];
    end
    empty = !any_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      for (int e = 0; e < ENTRIES; e++) begin
        tags[e] <= '0;
        data[e] <= '0;
        rank[e] <= EW'(e);
      end
    end else if (upd_valid) begin
      for (int e = 0; e < ENTRIES; e++)
        if (rank[e] < rank[tgt]) rank[e] <= rank[e] + 1'b1;
      rank[tgt] <= '0;
      vld[tgt]  <= 1'b1;
      tags[tgt] <= upd_tag;
      data[tgt] <= hit_found ? data[tgt] + upd_val : upd_val;
    end else if (flush && any_valid) begin
      vld[first_valid] <= 1'b0;
    end
  end
endmodule
