// act_buffer: activation buffer of a CANDLES PE.
//
// Holds one slice of the PE's activations: one compressed group of four non-zero
// activations for each of the 64 channels assigned to the PE (256 activations with
// their index metadata). A write stores a group arriving from the central buffer and
// sets the channel's valid bit when the group holds at least one activation; clear
// empties all valid bits before a new slice. chan_valid lets the PE skip channels
// whose feature-map slice is empty in the same cycle. Reads are combinational.
// Capacity follows the published design; the entry format is this design's own.
module act_buffer
  import candles_pkg::*;
#(
  parameter int GROUPS = 64,
  localparam int AW = $clog2(GROUPS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               wr_en,
  input  logic [AW-1:0]      wr_addr,
  input  act_group_t         wr_data,
  input  logic [AW-1:0]      rd_addr,
  output act_group_t         rd_data,
  output logic [GROUPS-1:0]  chan_valid
);
  act_group_t mem [GROUPS];

  assign rd_data = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chan_valid <= '0;
    else begin
      if (clear) chan_valid <= '0;
      if (wr_en) chan_valid[wr_addr] <= |wr_data.valid;
    end
  end
endmodule
