// weight_buffer: weight buffer of a CANDLES PE.
//
// 1024 entries of four weight lanes = 4K weights, each with its 4-bit absolute kernel
// position. Entry address = {row, channel}: a row holds, for one kernel group of four
// kernels and one weight pass, the weights of all 64 channels. Weights arrive from
// off-chip memory through the write port. Besides the array, the buffer keeps one
// valid bit per entry (set when any lane of the written entry is valid) and presents
// the 64 valid bits of the row selected by rd_row, so the PE can skip channels whose
// kernel slice is empty. Reads are combinational. 4K weights per PE follows the
// published design; the row layout is this design's own.
module weight_buffer
  import candles_pkg::*;
#(
  parameter int DEPTH = 1024,
  parameter int CH    = 64,
  localparam int AW   = $clog2(DEPTH),
  localparam int ROWS = DEPTH / CH,
  localparam int RW   = $clog2(ROWS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  wt_entry_t     wr_data,
  input  logic [AW-1:0] rd_addr,
  output wt_entry_t     rd_data,
  input  logic [RW-1:0] rd_row,
  output logic [CH-1:0] row_valid
);
  wt_entry_t mem [DEPTH];
  logic [CH-1:0] vbits [ROWS];

  assign rd_data   = mem[rd_addr];
  assign row_valid = vbits[rd_row];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) vbits[r] <= '0;
    end else if (wr_en) begin
      vbits[wr_addr[AW-1 -: RW]][wr_addr[AW-RW-1:0]] <= wr_data[0].valid | wr_data[1].valid |
                                          wr_data[2].valid | wr_data[3].valid;
    end
  end
endmodule
