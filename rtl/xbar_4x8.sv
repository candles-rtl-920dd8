// xbar_4x8: one of the four 4x8 crossbars of a CANDLES PE.
//
// Its four inputs are the partial sums of one output channel (one weight times four
// activations); its eight outputs feed the PSUM filters of the eight banks of that
// channel group. Input i carries a 3-bit bank select and a 6-bit entry tag. The four
// neurons of a cycle are always distinct, but two of them can map to the same bank
// (pixels eight apart). Each bank takes one partial sum per cycle: the lowest-numbered
// requesting input wins, and grant tells the PE which inputs went through; the
// others stay pending and are sent in a later cycle (the PE stalls meanwhile).
// Combinational. The 4x8 size follows the published design; the fixed-priority
// conflict resolution is this design's own.
module xbar_4x8
  import candles_pkg::*;
(
  input  logic [3:0]             req,
  input  logic [3:0][2:0]        bank_sel,
  input  logic [3:0][ENTRY_BITS-1:0] entry,
  input  psum_t                  val [4],
  output logic [3:0]             grant,
  output logic [7:0]             out_valid,
  output logic [7:0][ENTRY_BITS-1:0] out_entry,
  output psum_t                  out_val [8]
);
  always_comb begin
    grant     = '0;
    out_valid = '0;
    out_entry = '0;
    for (int b = 0; b < 8; b++) out_val[b] = '0;
    for (int i = 0; i < 4; i++) begin
      if (req[i] && !out_valid[bank_sel[i]]) begin
        grant[i] = 1'b1;
        out_valid[bank_sel[i]] = 1'b1;
        out_entry[bank_sel[i]] = entry[i];
        out_val[bank_sel[i]]   = val[i];
      end
    end
  end
endmodule
