// shift_add_stage: one butterfly stage of an H.264 1-D integer transform on
// one line of eight 16-bit coefficients.
//
// This is the "second stage multiplexing" and the "four sets of 8 adders" of
// the shared engine. For each of the eight output lanes, the operand selector
// picks up to four of the eight line inputs according to the transform flavour
// (op) and the stage being computed (st: e, f or g of the inverse, a, b or
// output of the forward transform), shifts each one (>>1, >>2 or <<1, all
// fixed wiring) and gives it a sign. Four adders per lane then form
//     sum = t0 + t1 + t2 + t3 + (rnd ? 32 : 0)
// so the design uses 4 x 8 adders. When rnd is set (last stage of the inverse
// column pass) the lane output is (sum + 32) >>> 6, the final rounding of the
// H.264 inverse transform. Results are saturated to 16 bits, the register
// width. The stage tables live in h264_xq_pkg.
//
// Purely combinational: the line is read from the register array, passes
// through this block and is written back in the same clock.
module shift_add_stage
  import h264_xq_pkg::*;
(
  input  xop_e        op,
  input  logic [1:0]  st,     // stage index, 0 .. num_stages(op)-1
  input  logic        rnd,    // add 32 and shift right by 6 (final inverse stage)
  input  coef_t       din  [LINE],
  output coef_t       dout [LINE]
);

  for (genvar l = 0; l < LINE; l++) begin : g_lane
    logic signed [SUMW-1:0] term [4];
    logic signed [SUMW-1:0] sum;

    always_comb begin
      for (int k = 0; k < 4; k++) begin
        term_t tt;
        logic signed [SUMW-1:0] v;
        tt = stage_term(op, int'(st), l, k);
        v  = SUMW'(din[tt.src]);
        case (tt.sh)
          SH_R1:   v = v >>> 1;
          SH_R2:   v = v >>> 2;
          SH_L1:   v = v <<< 1;
          default: ;
        endcase
        if (!tt.en)     term[k] = '0;
        else if (tt.neg) term[k] = -v;
        else             term[k] = v;
      end
      sum = term[0] + term[1] + term[2] + term[3] + (rnd ? SUMW'(32) : SUMW'(0));
      if (rnd) sum = sum >>> 6;
      dout[l] = sat16(48'(sum));
    end
  end

endmodule
