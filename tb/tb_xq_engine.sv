// tb_xq_engine: self-checking testbench of the shared transform /
// quantization engine.
//
// Runs random 8x8 regions through the engine in both modes and both transform
// sizes, with random qp (0..51) and intra/inter rounding, and compares every
// quantized level row and every reconstructed residual row with the reference
// model in h264_ref_pkg. Residuals are random in -255..255; decompressor
// levels come from the reference compressor, so they are realistic. It also
// checks the clock count from start to done of every block, and that both
// pipeline stalls (multipliers waiting for adders, adders waiting for
// multipliers) occur.
module tb_xq_engine;
  import h264_xq_pkg::*;
  import h264_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, compress, sz8, intra, busy, done;
  logic [5:0]  qp;
  logic        ld_valid, ld_ready, lvl_valid, res_valid, mult_wait, add_wait;
  coef_t       ld_row [LINE], lvl_row [LINE], res_row [LINE];

  xq_engine dut (.*);

  int checks = 0, failures = 0;
  int n_mwait = 0, n_await = 0;

  always @(posedge clk) begin
    if (mult_wait) n_mwait++;
    if (add_wait)  n_await++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // run one region; returns clocks from start to done
  task automatic run(bit cmp, bit s8, int q, bit in, blk_t x, blk_t exp_lvl, blk_t exp_res);
    int li = 0, ri = 0, cyc = 0, want;
    @(negedge clk);
    start = 1; compress = cmp; sz8 = s8; qp = 6'(q); intra = in;
    @(negedge clk);
    start = 0;
    fork
      begin
        for (int r = 0; r < 8; r++) begin
          ld_valid = 1;
          for (int k = 0; k < 8; k++) ld_row[k] = coef_t'(x[r][k]);
          @(posedge clk);
          while (!ld_ready) @(posedge clk);
          @(negedge clk);
        end
        ld_valid = 0;
      end
      begin
        cyc = 1;
        while (!done) begin
          @(posedge clk);
          #1;
          cyc++;
          if (lvl_valid) begin
            for (int k = 0; k < 8; k++)
              check(int'(lvl_row[k]) == exp_lvl[li][k],
                    $sformatf("lvl s8=%0d qp=%0d [%0d][%0d] got %0d exp %0d", s8, q, li, k, lvl_row[k], exp_lvl[li][k]));
            li++;
          end
          if (res_valid) begin
            for (int k = 0; k < 8; k++)
              check(int'(res_row[k]) == exp_res[ri][k],
                    $sformatf("res cmp=%0d s8=%0d qp=%0d [%0d][%0d] got %0d exp %0d", cmp, s8, q, ri, k, res_row[k], exp_res[ri][k]));
            ri++;
          end
        end
      end
    join
    check(li == (cmp ? 8 : 0), "level row count");
    check(ri == 8, "residual row count");
    want = cmp ? (s8 ? 115 : 67) : (s8 ? 66 : 50);
    check(cyc == want, $sformatf("clocks cmp=%0d s8=%0d got %0d want %0d", cmp, s8, cyc, want));
  endtask

  initial begin
    blk_t x, c, l, r;
    bit s8, in;
    int q, amp;
    start = 0; compress = 0; sz8 = 0; intra = 0; qp = 0; ld_valid = 0;
    for (int k = 0; k < 8; k++) ld_row[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 80; n++) begin
      s8  = n[0];
      in  = n[1];
      q   = (n < 8) ? n * 7 : int'($urandom_range(0, 51));
      amp = (n % 5 == 0) ? 255 : 40;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          x[i][j] = int'($urandom_range(0, 2 * amp)) - amp;
      c = s8 ? fwd8(x) : fwd4(x);
      l = quant(c, s8, q, in);
      r = inv(dequant(l, s8, q), s8);
      if (n % 3 == 2) run(1'b0, s8, q, in, l, l, r);   // decompressor
      else            run(1'b1, s8, q, in, x, l, r);   // compressor
    end
    check(n_mwait > 0, "multipliers waited for adders");
    check(n_await > 0, "adders waited for multipliers");
    $display("stalls: mult_wait=%0d add_wait=%0d", n_mwait, n_await);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
