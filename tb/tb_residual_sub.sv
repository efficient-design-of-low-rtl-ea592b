// tb_residual_sub: self-checking testbench of the residual subtraction,
// including the extreme differences 255 - 0 and 0 - 255.
module tb_residual_sub;
  import h264_xq_pkg::*;

  logic [PIXW-1:0] cur [LINE], pred [LINE];
  coef_t           res [LINE];

  residual_sub dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int k = 0; k < 8; k++) begin
        cur[k]  = (n == 0) ? 8'(255 * (k % 2)) : 8'($urandom_range(0, 255));
        pred[k] = (n == 0) ? 8'(255 * (1 - k % 2)) : 8'($urandom_range(0, 255));
      end
      #1;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (int'(res[k]) != int'(cur[k]) - int'(pred[k])) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d - %0d gave %0d", cur[k], pred[k], res[k]);
        end
      end
    end
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
