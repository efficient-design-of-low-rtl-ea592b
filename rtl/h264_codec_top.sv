// h264_codec_top: transform / quantization core of an H.264 compressor and
// decompressor for one macroblock at a time, built around a single shared
// engine.
//
// A macroblock is processed as six 8x8 regions, in this order: the four 8x8
// quarters of the 16x16 luma block (raster order, each one 8x8 integer
// transform), then the 8x8 Cb and the 8x8 Cr region (each four 4x4 integer
// transforms done together). For every region the top
//   - takes 8 input rows, each with 8 predicted samples and either 8 current
//     samples (compressor: the residual is formed by residual_sub) or 8
//     quantized levels (decompressor: loaded as they are),
//   - runs the region through xq_engine (forward transform, quantization,
//     rescaling and inverse transform in compressor mode; rescaling and
//     inverse transform in decompressor mode),
//   - sends the quantized levels out row by row (compressor only) towards the
//     entropy coder,
//   - adds the decoded residual rows to the stored prediction (recon_add) and
//     sends the reconstructed rows out towards the loop filter.
// The prediction itself (motion compensation or intra prediction), the entropy
// coder/decoder and the loop filter are outside this core; their data enter
// and leave through the ports below.
//
// Interface: pulse mb_start for one clock while idle, with compress, qp and
// intra valid (captured for the whole macroblock). Input rows use a
// valid/ready handshake (in_ready high only while the engine is loading).
// lvl_* and rec_* rows are valid for one clock each with no back-pressure;
// *_blk gives the region (0-3 luma, 4 Cb, 5 Cr) and *_row the row within it.
// mb_done pulses once after the last reconstructed row. With inputs always
// valid, a macroblock takes 601 clocks to compress and 371 to decompress,
// from the edge that samples mb_start to the edge that raises mb_done.
//
// Coded block pattern: in compressor mode cbp[b] tells, once mb_done has
// pulsed, whether region b produced any non-zero level (valid until the next
// mb_start). In decompressor mode cbp_in (captured at mb_start) says which
// regions carry levels; for a region whose bit is 0 the in_lvl rows are
// ignored and zero levels are loaded, so that region reconstructs to its
// prediction. The pattern travels with the quantized data to and from the
// entropy coder. One bit per 8x8 region is this design's own reading of it
// (the standard codes chroma as DC/AC classes, and there is no separate
// chroma DC path here).
// The region order and the handshakes are this design's own choices.
module h264_codec_top
  import h264_xq_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            mb_start,
  input  logic            compress,      // 1: compressor, 0: decompressor
  input  logic [5:0]      qp,
  input  logic            intra,         // quantizer rounding offset choice
  input  logic [5:0]      cbp_in,        // coded regions (decompressor)
  output logic [5:0]      cbp,           // coded regions (compressor)
  output logic            busy,
  output logic            mb_done,
  // input rows
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [PIXW-1:0] in_cur  [LINE],  // current samples (compressor)
  input  coef_t           in_lvl  [LINE],  // quantized levels (decompressor)
  input  logic [PIXW-1:0] in_pred [LINE],  // predicted samples
  // quantized levels towards the entropy coder (compressor)
  output logic            lvl_valid,
  output logic [2:0]      lvl_blk,
  output logic [2:0]      lvl_row,
  output coef_t           lvl_data [LINE],
  // reconstructed samples towards the loop filter
  output logic            rec_valid,
  output logic [2:0]      rec_blk,
  output logic [2:0]      rec_row,
  output logic [PIXW-1:0] rec_data [LINE],
  // engine activity, for observation
  output logic            mult_wait,
  output logic            add_wait
);

  localparam int unsigned NBLK = 6;   // 4 luma 8x8 + Cb + Cr

  typedef enum logic [1:0] {T_IDLE, T_START, T_RUN} tstate_e;

  tstate_e     tstate;
  logic        cmp_q, intra_q;
  logic [5:0]  qp_q;
  logic [5:0]  cbp_in_q;
  logic        nz;     // a level row with a non-zero level
  logic [2:0]  blk;
  logic [2:0]  in_row_q, lvl_row_q, rec_row_q;

  logic [PIXW-1:0] pred_buf [LINE][LINE];

  logic        eng_start, eng_busy, eng_done;
  logic        ld_ready, e_lvl_valid, e_res_valid;
  coef_t       ld_row [LINE], res_row [LINE], sub_row [LINE];

  residual_sub u_sub (.cur(in_cur), .pred(in_pred), .res(sub_row));

  always_comb
    for (int k = 0; k < LINE; k++)
      ld_row[k] = cmp_q ? sub_row[k] : (cbp_in_q[blk] ? in_lvl[k] : '0);

  always_comb begin
    nz = 1'b0;
    for (int k = 0; k < LINE; k++)
      if (lvl_data[k] != '0) nz = 1'b1;
  end

  assign eng_start = (tstate == T_START);

  xq_engine u_eng (
    .clk, .rst_n,
    .start(eng_start), .compress(cmp_q), .sz8(blk < 3'd4), .qp(qp_q), .intra(intra_q),
    .busy(eng_busy), .done(eng_done),
    .ld_valid(in_valid), .ld_ready, .ld_row,
    .lvl_valid(e_lvl_valid), .lvl_row(lvl_data),
    .res_valid(e_res_valid), .res_row,
    .mult_wait, .add_wait
  );

  recon_add u_add (.pred(pred_buf[rec_row_q]), .res(res_row), .rec(rec_data));

  assign in_ready  = ld_ready;
  assign lvl_valid = e_lvl_valid;
  assign lvl_blk   = blk;
  assign lvl_row   = lvl_row_q;
  assign rec_valid = e_res_valid;
  assign rec_blk   = blk;
  assign rec_row   = rec_row_q;
  assign busy      = (tstate != T_IDLE) || eng_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate    <= T_IDLE;
      cmp_q     <= 1'b0;
      intra_q   <= 1'b0;
      qp_q      <= '0;
      blk       <= '0;
      in_row_q  <= '0;
      lvl_row_q <= '0;
      rec_row_q <= '0;
      mb_done   <= 1'b0;
      cbp_in_q  <= '0;
      cbp       <= '0;
      for (int i = 0; i < LINE; i++)
        for (int j = 0; j < LINE; j++)
          pred_buf[i][j] <= '0;
    end else begin
      mb_done <= 1'b0;
      if (in_valid && ld_ready) begin
        pred_buf[in_row_q] <= in_pred;
        in_row_q <= in_row_q + 3'd1;
      end
      if (e_lvl_valid) begin
        lvl_row_q <= lvl_row_q + 3'd1;
        if (nz) cbp[blk] <= 1'b1;
      end
      if (e_res_valid) rec_row_q <= rec_row_q + 3'd1;
      case (tstate)
        T_IDLE: if (mb_start) begin
          cmp_q   <= compress;
          intra_q <= intra;
          qp_q    <= qp;
          cbp_in_q <= cbp_in;
          cbp     <= '0;
          blk     <= '0;
          tstate  <= T_START;
        end
        T_START: tstate <= T_RUN;
        T_RUN: if (eng_done) begin
          if (blk == 3'(NBLK - 1)) begin
            mb_done <= 1'b1;
            tstate  <= T_IDLE;
          end else begin
            blk    <= blk + 3'd1;
            tstate <= T_START;
          end
        end
        default: tstate <= T_IDLE;
      endcase
    end
  end

endmodule
