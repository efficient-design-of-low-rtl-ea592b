// tb_recon_add: self-checking testbench of the reconstruction adder, with
// residuals well beyond the sample range so that both clipping limits are hit.
module tb_recon_add;
  import h264_xq_pkg::*;

  logic [PIXW-1:0] pred [LINE], rec [LINE];
  coef_t           res [LINE];

  recon_add dut (.*);

  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;

  initial begin
    int s;
    for (int n = 0; n < 500; n++) begin
      for (int k = 0; k < 8; k++) begin
        pred[k] = 8'($urandom_range(0, 255));
        res[k]  = (n % 4 == 0) ? coef_t'(int'($urandom_range(0, 60000)) - 30000)
                               : coef_t'(int'($urandom_range(0, 600)) - 300);
      end
      #1;
      for (int k = 0; k < 8; k++) begin
        s = int'(pred[k]) + int'(res[k]);
        if (s < 0) begin s = 0; n_lo++; end
        if (s > 255) begin s = 255; n_hi++; end
        checks++;
        if (int'(rec[k]) != s) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d + %0d gave %0d", pred[k], res[k], rec[k]);
        end
      end
    end
    checks++;
    if (n_lo == 0 || n_hi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
