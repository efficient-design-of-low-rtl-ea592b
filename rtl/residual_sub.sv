// residual_sub: the subtraction at the head of the compressor's forward path.
//
// Subtracts one row of eight predicted samples (from motion compensation or
// intra prediction) from the matching row of the current block, giving eight
// signed residuals in -255 .. 255 that the transform engine loads as one row
// of its register array. Combinational; the samples are 8-bit unsigned and the
// residuals are sign-extended to the 16-bit register width. The 8-bit sample
// depth is this design's choice.
module residual_sub
  import h264_xq_pkg::*;
(
  input  logic [PIXW-1:0] cur  [LINE],
  input  logic [PIXW-1:0] pred [LINE],
  output coef_t           res  [LINE]
);

  always_comb
    for (int k = 0; k < LINE; k++)
      res[k] = coef_t'({1'b0, cur[k]}) - coef_t'({1'b0, pred[k]});

endmodule
