// tb_quant_mult: self-checking testbench of the eight multipliers/shifters.
//
// Drives random lines (row or column, random index) with random qp, intra
// flag and block size, in both quantize and rescale mode, and compares each
// lane with the quantizer formulas of h264_ref_pkg evaluated at the lane's
// (row, column) position. Also checks saturation of a large rescaled value.
module tb_quant_mult;
  import h264_xq_pkg::*;
  import h264_ref_pkg::*;

  logic       inv, sz8, intra, col;
  logic [5:0] qp;
  logic [2:0] idx;
  coef_t      din [LINE], dout [LINE];

  quant_mult dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int i, j, q, w, e, qbits, m;
    longint f, a;
    for (int n = 0; n < 3000; n++) begin
      inv   = n[0];
      sz8   = n[1];
      intra = n[2];
      col   = n[3];
      q     = (n < 104) ? (n / 2) % 52 : int'($urandom_range(0, 51));
      qp    = 6'(q);
      idx   = 3'($urandom_range(0, 7));
      for (int k = 0; k < 8; k++)
        din[k] = inv ? coef_t'(int'($urandom_range(0, 80)) - 40)
                     : coef_t'(int'($urandom_range(0, 40000)) - 20000);
      #1;
      for (int k = 0; k < 8; k++) begin
        i = col ? k : int'(idx);
        j = col ? int'(idx) : k;
        w = int'(din[k]);
        if (!inv) begin
          qbits = (sz8 ? 16 : 15) + q / 6;
          f = (longint'(1) << qbits) / (intra ? 3 : 6);
          a = w < 0 ? -w : w;
          m = int'((a * mf_at(sz8, q % 6, i, j) + f) >> qbits);
          e = w < 0 ? -m : m;
        end else begin
          e = w * v_at(sz8, q % 6, i, j) * (1 << (q / 6));
          if (sz8) e = (e + 2) >>> 2;
          if (e > 32767) e = 32767;
          if (e < -32768) e = -32768;
        end
        check(int'(dout[k]) == e, $sformatf("inv=%0d sz8=%0d qp=%0d (%0d,%0d) in %0d got %0d exp %0d",
                                              inv, sz8, q, i, j, w, dout[k], e));
      end
    end
    inv = 1; sz8 = 0; qp = 6'd51; col = 0; idx = 0;
    for (int k = 0; k < 8; k++) din[k] = 16'sd1000;
    #1;
    check(dout[0] == 16'sd32767, "rescale saturates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
