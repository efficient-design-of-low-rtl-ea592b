// quant_mult: the set of eight multipliers and eight shifters of the shared
// engine. It quantizes (compressor) or rescales (decompressor) one line of
// eight coefficients per clock.
//
// Each lane works on the coefficient at position (i,j) of the 8x8 array, where
// the line is row idx (col = 0) or column idx (col = 1). The multiplier factor
// depends on qp % 6 and on the position class of (i,j) in its 4x4 or 8x8
// block; the shift depends on qp / 6. With flat weighting (H.264 default):
//
//   quantize   Z  = sign(W) * ((|W| * MF + f) >> qbits)
//              qbits = 15 + qp/6 (4x4) or 16 + qp/6 (8x8),
//              f = 2^qbits / 3 for intra, 2^qbits / 6 for inter blocks
//   rescale    W' = (Z * V) << qp/6                   (4x4)
//              W' = ((Z * V8) << qp/6 + 2) >>> 2      (8x8)
//
// The 8x8 rescale is the standard's LevelScale8x8 = 16 * V8 form with its
// rounding, rewritten so that the shifter only ever shifts left before a
// fixed >> 2. Results are saturated to 16 bits. Combinational; the engine
// writes the result back into the register array. The eight multipliers
// followed by eight shifters, and the row (rescale) / column (quantize)
// orientation, are those of the architecture; the formulas, tables and
// rounding offsets are the H.264 standard's and the reference encoder's,
// chosen here because the architecture names only the operation.
module quant_mult
  import h264_xq_pkg::*;
(
  input  logic        inv,     // 0: quantize, 1: rescale (inverse quantize)
  input  logic        sz8,     // 1: 8x8 block, 0: 4x4 blocks
  input  logic [5:0]  qp,      // 0 .. 51
  input  logic        intra,   // rounding offset for quantization
  input  logic        col,     // line is a column
  input  logic [2:0]  idx,     // line index
  input  coef_t       din  [LINE],
  output coef_t       dout [LINE]
);

  logic [3:0] qdiv;   // qp / 6
  logic [2:0] qmod;   // qp % 6
  always_comb begin
    qdiv = 4'(qp / 6);
    qmod = 3'(qp % 6);
  end

  for (genvar k = 0; k < LINE; k++) begin : g_lane
    int unsigned i, j, cls;
    logic [14:0]              mf;
    logic [5:0]               v;
    logic [4:0]               qbits;
    logic [47:0]              mag;
    logic [47:0]              fofs;
    logic signed [47:0]       prod;

    always_comb begin
      i = col ? k : int'(idx);
      j = col ? int'(idx) : k;
      cls = sz8 ? pos_class8(i, j) : pos_class4(i, j);
      mf  = sz8 ? mf8(int'(qmod), cls) : mf4(int'(qmod), cls);
      v   = sz8 ? v8(int'(qmod), cls)  : v4(int'(qmod), cls);
      qbits = (sz8 ? 5'd16 : 5'd15) + 5'(qdiv);
      // floor(2^qbits / 3) is the binary fraction 1/3 = 0.0101.. shifted down
      fofs  = 48'h5555_5555_5555 >> (6'd48 - 6'(qbits) + (intra ? 6'd0 : 6'd1));
      mag   = '0;
      prod  = '0;
      if (!inv) begin
        // multiplier on |W|, then the shifter
        mag  = 48'(din[k] < 0 ? -48'(din[k]) : 48'(din[k])) * 48'(mf);
        mag  = (mag + fofs) >> qbits;
        prod = din[k] < 0 ? -$signed(mag) : $signed(mag);
      end else begin
        prod = 48'(din[k]) * $signed({42'd0, v});
        prod = prod <<< qdiv;
        if (sz8) prod = (prod + 48'sd2) >>> 2;
      end
      dout[k] = sat16(prod);
    end
  end

endmodule
