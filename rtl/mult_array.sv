// mult_array: the 4x4 multiplier array of a CANDLES PE.
//
// Each cycle it forms the cartesian product of four non-zero activations (one
// channel, four pixels) and four weights (the same channel, four kernels):
// prod[f][i] = act[i] * wt[f], sign-extended to the partial-sum width. Row f of
// the result therefore holds the four partial sums of one output channel, which is
// what one 4x8 crossbar receives. Purely combinational; the PE registers around it.
// The 4x4 shape and 8-bit operands with 24-bit sums follow the published design;
// signed two's-complement arithmetic is this design's choice.
module mult_array
  import candles_pkg::*;
#(
  parameter int N = 4
) (
  input  act_t                     act [N],
  input  wt_t                      wt  [N],
  output psum_t                    prod [N][N]   // [kernel f][activation i]
);
  always_comb begin
    for (int f = 0; f < N; f++)
      for (int i = 0; i < N; i++)
        prod[f][i] = psum_t'(act[i] * wt[f]);
  end
endmodule
