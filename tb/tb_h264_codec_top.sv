// tb_h264_codec_top: end-to-end testbench of the macroblock codec core, at
// the design's default configuration.
//
// Each round compresses one random macroblock (four 8x8 luma regions, then
// Cb and Cr as four 4x4 blocks each) and then decompresses the levels that the
// compressor produced, with the same prediction. It checks
//   - every quantized level row against the reference model (h264_ref_pkg),
//   - every reconstructed row of the compressor against the reference,
//   - that the decompressor reconstructs exactly what the compressor
//     reconstructed (no encoder/decoder mismatch),
//   - the clock count of a macroblock when the input never stalls, and that
//     a compressed macroblock stays within 4115 clocks, the budget of 1080p at
//     30 frames/s with a 1 GHz clock.
//   - the coded block pattern of the compressor, and that the decompressor
//     ignores the level rows of regions its cbp_in marks as not coded (they
//     are driven with random values),
// It counts the mechanisms of the design and fails if one never happened:
// compressor and decompressor macroblocks, a mode switch, 8x8 and 4x4
// regions, both pipeline stalls inside the engine, input stalls, intra and
// inter rounding, clipping in the reconstruction adder, and coded and
// uncoded regions.
module tb_h264_codec_top;
  import h264_xq_pkg::*;
  import h264_ref_pkg::*;

  localparam int MB_CMP_CLOCKS = 601;
  localparam int MB_DEC_CLOCKS = 371;
  localparam int BUDGET_1GHZ   = 4115;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            mb_start, compress, intra, busy, mb_done;
  logic [5:0]      qp, cbp_in, cbp;
  logic            in_valid, in_ready, lvl_valid, rec_valid, mult_wait, add_wait;
  logic [PIXW-1:0] in_cur [LINE], in_pred [LINE], rec_data [LINE];
  coef_t           in_lvl [LINE], lvl_data [LINE];
  logic [2:0]      lvl_blk, lvl_row, rec_blk, rec_row;

  h264_codec_top dut (.*);

  int checks = 0, failures = 0;
  int n_cmp = 0, n_dec = 0, n_switch = 0, n_r8 = 0, n_r4 = 0, n_mwait = 0, n_await = 0;
  int n_install = 0, n_intra = 0, n_inter = 0, n_clip = 0, n_coded = 0, n_uncoded = 0;

  blk_t cur [6], pred [6], lvl_exp [6], rec_exp [6], lvl_got [6], rec_got [6];
  bit   gaps;

  always @(posedge clk) begin
    if (mult_wait) n_mwait++;
    if (add_wait)  n_await++;
    if (in_ready && !in_valid && busy) n_install++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // reference for one region
  task automatic reference(int b, int q, bit in);
    blk_t x, c, r;
    bit s8 = (b < 4);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) x[i][j] = cur[b][i][j] - pred[b][i][j];
    c = s8 ? fwd8(x) : fwd4(x);
    lvl_exp[b] = quant(c, s8, q, in);
    r = inv(dequant(lvl_exp[b], s8, q), s8);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        int s = pred[b][i][j] + r[i][j];
        if (s < 0 || s > 255) n_clip++;
        rec_exp[b][i][j] = s < 0 ? 0 : (s > 255 ? 255 : s);
      end
  endtask

  task automatic run_mb(bit cmp, int q, bit in, output int clocks);
    int t0;
    @(negedge clk);
    mb_start = 1; compress = cmp; qp = 6'(q); intra = in;
    @(negedge clk);
    mb_start = 0;
    t0 = 1;
    clocks = 0;
    fork
      begin : feed
        for (int b = 0; b < 6; b++)
          for (int r = 0; r < 8; r++) begin
            while (gaps && $urandom_range(0, 2) == 0) begin
              in_valid = 0;
              @(negedge clk);
            end
            in_valid = 1;
            for (int k = 0; k < 8; k++) begin
              in_cur[k]  = 8'(cur[b][r][k]);
              in_pred[k] = 8'(pred[b][r][k]);
              in_lvl[k]  = cbp_in[b] ? coef_t'(lvl_got[b][r][k]) : coef_t'($urandom);
            end
            @(posedge clk);
            while (!in_ready) @(posedge clk);
            @(negedge clk);
            in_valid = 0;
          end
      end
      begin : watch
        clocks = 1;
        while (!mb_done) begin
          @(posedge clk);
          #1;
          clocks++;
          if (lvl_valid) begin
            check(cmp, "levels only in compressor mode");
            for (int k = 0; k < 8; k++) begin
              lvl_got[lvl_blk][lvl_row][k] = int'(lvl_data[k]);
              check(int'(lvl_data[k]) == lvl_exp[lvl_blk][lvl_row][k],
                    $sformatf("level blk %0d row %0d col %0d: %0d, expected %0d",
                              lvl_blk, lvl_row, k, lvl_data[k], lvl_exp[lvl_blk][lvl_row][k]));
            end
          end
          if (rec_valid) begin
            if (rec_row == 3'd7) begin
              if (rec_blk < 3'd4) n_r8++; else n_r4++;
            end
            for (int k = 0; k < 8; k++) begin
              if (cmp) begin
                rec_got[rec_blk][rec_row][k] = int'(rec_data[k]);
                check(int'(rec_data[k]) == rec_exp[rec_blk][rec_row][k],
                      $sformatf("recon blk %0d row %0d col %0d: %0d, expected %0d",
                                rec_blk, rec_row, k, rec_data[k], rec_exp[rec_blk][rec_row][k]));
              end else begin
                check(int'(rec_data[k]) == rec_got[rec_blk][rec_row][k],
                      $sformatf("decoder mismatch blk %0d row %0d col %0d", rec_blk, rec_row, k));
              end
            end
          end
        end
      end
    join
  endtask

  initial begin
    int q, clocks, amp, p, d;
    bit in, last_cmp, any;
    mb_start = 0; compress = 0; intra = 0; qp = 0; cbp_in = '0; in_valid = 0; gaps = 0;
    for (int k = 0; k < 8; k++) begin in_cur[k] = '0; in_pred[k] = '0; in_lvl[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    last_cmp = 0;
    for (int round = 0; round < 12; round++) begin
      q    = (round == 0) ? 28 : (round == 1) ? 0 : (round == 2) ? 48 : int'($urandom_range(0, 51));
      if (round % 4 == 1 && round > 1) q = int'($urandom_range(30, 51));
      in   = round[0];
      gaps = (round % 3 == 2);
      amp  = (round % 4 == 1) ? 255 : 30;
      for (int b = 0; b < 6; b++) begin
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) begin
            p = int'($urandom_range(0, 255));
            d = int'($urandom_range(0, 2 * amp)) - amp;
            pred[b][i][j] = p;
            cur[b][i][j]  = (p + d < 0) ? 0 : (p + d > 255) ? 255 : p + d;
            if (amp == 255) cur[b][i][j] = int'($urandom_range(0, 255));
          end
        reference(b, q, in);
      end
      if (in) n_intra++; else n_inter++;
      // compressor
      if (!last_cmp) n_switch++;
      run_mb(1'b1, q, in, clocks);
      n_cmp++;
      last_cmp = 1;
      if (!gaps) check(clocks == MB_CMP_CLOCKS, $sformatf("compressor macroblock took %0d clocks", clocks));
      if (!gaps) check(clocks <= BUDGET_1GHZ, "compressor macroblock within the 1080p30 budget at 1 GHz");
      for (int b = 0; b < 6; b++) begin
        any = 0;
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++)
            if (lvl_exp[b][i][j] != 0) any = 1;
        check(cbp[b] == any, $sformatf("cbp bit %0d is %0d", b, cbp[b]));
        if (any) n_coded++; else n_uncoded++;
      end
      cbp_in = cbp;
      // decompressor on the compressor's own levels
      n_switch++;
      run_mb(1'b0, q, in, clocks);
      n_dec++;
      last_cmp = 0;
      if (!gaps) check(clocks == MB_DEC_CLOCKS, $sformatf("decompressor macroblock took %0d clocks", clocks));
    end
    check(n_cmp > 0,     "compressor macroblocks ran");
    check(n_dec > 0,     "decompressor macroblocks ran");
    check(n_switch > 1,  "mode switches happened");
    check(n_r8 > 0,      "8x8 regions ran");
    check(n_r4 > 0,      "4x4 regions ran");
    check(n_mwait > 0,   "multipliers waited for adders");
    check(n_await > 0,   "adders waited for multipliers");
    check(n_install > 0, "input stalls happened");
    check(n_intra > 0 && n_inter > 0, "intra and inter rounding used");
    check(n_clip > 0,    "reconstruction clipped");
    check(n_coded > 0 && n_uncoded > 0, "coded and uncoded regions");
    $display("events: cmp=%0d dec=%0d switch=%0d r8=%0d r4=%0d mwait=%0d await=%0d install=%0d intra=%0d inter=%0d clip=%0d coded=%0d uncoded=%0d",
             n_cmp, n_dec, n_switch, n_r8, n_r4, n_mwait, n_await, n_install, n_intra, n_inter, n_clip, n_coded, n_uncoded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
