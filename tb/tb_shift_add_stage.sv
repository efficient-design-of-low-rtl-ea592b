// tb_shift_add_stage: self-checking testbench of one butterfly stage.
//
// For each transform flavour it feeds a random line through all of the
// flavour's stages in turn (each stage's output is the next stage's input, as
// the register array does) and compares the result with the 1-D transforms of
// h264_ref_pkg; with rnd set on the last stage it checks (y + 32) >> 6. It also
// checks saturation to the 16-bit range.
module tb_shift_add_stage;
  import h264_xq_pkg::*;
  import h264_ref_pkg::*;

  xop_e       op;
  logic [1:0] st;
  logic       rnd;
  coef_t      din [LINE], dout [LINE];

  shift_add_stage dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic vec8_t fwd4_1d(vec8_t x);
    vec8_t y;
    for (int b = 0; b < 8; b += 4) begin
      y[b]   = x[b] + x[b+1] + x[b+2] + x[b+3];
      y[b+1] = 2 * x[b] + x[b+1] - x[b+2] - 2 * x[b+3];
      y[b+2] = x[b] - x[b+1] - x[b+2] + x[b+3];
      y[b+3] = x[b] - 2 * x[b+1] + 2 * x[b+2] - x[b+3];
    end
    return y;
  endfunction

  initial begin
    vec8_t x, ref_y;
    int e;
    xop_e ops [4] = '{OP_FWD8, OP_FWD4, OP_INV8, OP_INV4};
    for (int n = 0; n < 400; n++) begin
      op  = ops[n % 4];
      rnd = 1'b0;
      for (int k = 0; k < 8; k++) begin
        x[k] = int'($urandom_range(0, 2000)) - 1000;
        din[k] = coef_t'(x[k]);
      end
      case (op)
        OP_FWD8: ref_y = fwd8_1d(x);
        OP_FWD4: ref_y = fwd4_1d(x);
        OP_INV8: ref_y = inv8_1d(x);
        default: ref_y = inv4_1d(x);
      endcase
      for (int s = 0; s < int'(num_stages(op)); s++) begin
        st  = 2'(s);
        rnd = (n % 8 >= 4) && (s == int'(num_stages(op)) - 1);
        #1;
        if (s < int'(num_stages(op)) - 1) din = dout;
      end
      for (int k = 0; k < 8; k++) begin
        e = rnd ? ((ref_y[k] + 32) >>> 6) : ref_y[k];
        check(int'(dout[k]) == e, $sformatf("op=%0d rnd=%0d lane %0d got %0d exp %0d", op, rnd, k, dout[k], e));
      end
    end
    // saturation: forward 4x4 DC of four large values
    op = OP_FWD4; st = 0; rnd = 0;
    for (int k = 0; k < 8; k++) din[k] = (k < 4) ? 16'sd30000 : -16'sd30000;
    #1;
    check(dout[0] == 16'sd32767, "positive saturation");
    check(dout[4] == -16'sd32768, "negative saturation");
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
