// acc_bank: one bank of the second-level (L2) accumulator buffer of a CANDLES PE.
//
// 64 entries of 24-bit partial sums (32 banks make the 6 KB buffer). Port A is a
// read-modify-write adder: when add_en is high, mem[add_addr] += add_val at the clock
// edge; it serves PSUM-filter evictions and partial sums received from a neighbour
// PE. Port B reads an entry combinationally and clears it at the edge (rc_en), which
// drains the results of a tile and leaves the bank zeroed for the next one. clr_en
// zeroes one entry (used to initialise the bank after reset). If port A and port B
// hit the same entry in one cycle, the clear wins and the add is lost: the PE never
// does both at once. Depth and width follow the published design; the port set and
// clear-on-read are this design's choice.
module acc_bank
  import candles_pkg::*;
#(
  parameter int DEPTH = 64,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          add_en,
  input  logic [AW-1:0] add_addr,
  input  psum_t         add_val,
  input  logic          rc_en,
  input  logic [AW-1:0] rc_addr,
  output psum_t         rc_data,
  input  logic          clr_en,
  input  logic [AW-1:0] clr_addr
);
  psum_t mem [DEPTH];

  assign rc_data = mem[rc_addr];

  always_ff @(posedge clk) begin
    if (add_en) mem[add_addr] <= mem[add_addr] + add_val;
    if (rc_en)  mem[rc_addr]  <= '0;
    if (clr_en) mem[clr_addr] <= '0;
  end
endmodule
