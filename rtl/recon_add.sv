// recon_add: the addition at the end of the reconstruction path, used by both
// the compressor and the decompressor.
//
// Adds one row of eight decoded residuals (output of the inverse transform) to
// the matching row of predicted samples and clips the result to the 8-bit
// sample range 0 .. 255, giving the reconstructed row that goes on to the loop
// filter and serves as reference for later predictions. Combinational. The
// clipping range (8-bit samples) is this design's choice.
module recon_add
  import h264_xq_pkg::*;
(
  input  logic [PIXW-1:0] pred [LINE],
  input  coef_t           res  [LINE],
  output logic [PIXW-1:0] rec  [LINE]
);

  always_comb
    for (int k = 0; k < LINE; k++) begin
      logic signed [CW:0] s;
      s = CW'(signed'({1'b0, pred[k]})) + (CW+1)'(res[k]);
      if (s < 0)         rec[k] = '0;
      else if (s > 255)  rec[k] = 8'd255;
      else               rec[k] = s[PIXW-1:0];
    end

endmodule
