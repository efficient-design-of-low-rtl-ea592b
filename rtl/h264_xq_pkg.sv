// h264_xq_pkg: types, constants and tables shared by the H.264 integer
// transform / quantization engine.
//
// The engine keeps one 8x8 region of 16-bit coefficients and runs the H.264
// integer transforms on it one 8-element line (row or column) at a time, one
// butterfly stage per clock. This package describes every stage as a small
// table: for each of the 8 output lanes, up to four terms, each one of the 8
// line inputs, optionally shifted (>>1, >>2 or <<1) and optionally negated,
// plus a rounding constant and a final right shift. The same shift-and-add
// hardware therefore does the forward and the inverse transform of either
// size; only the table lookup changes.
//
// Stage counts follow the description of the design: the inverse 8x8 and
// forward 8x8 transforms take three stages per line, the inverse 4x4 two and
// the forward 4x4 one. The butterfly equations are those of the H.264
// standard (inverse) and of the common reference encoder (forward 8x8); the
// forward 4x4 is the matrix C1 written out as one four-term sum per output.
//
// The quantization tables are the standard H.264 ones with flat (default)
// weighting: MF and V for 4x4 blocks, and their 8x8 counterparts.
package h264_xq_pkg;

  localparam int unsigned LINE   = 8;   // elements per row / column
  localparam int unsigned CW     = 16;  // coefficient register width
  localparam int unsigned SUMW   = 20;  // width inside a shift-and-add lane
  localparam int unsigned PIXW   = 8;   // sample width

  typedef logic signed [CW-1:0] coef_t;
  typedef coef_t line_t [LINE];

  // Transform flavours the engine can run on its 8x8 register array.
  typedef enum logic [1:0] {
    OP_FWD8 = 2'd0,   // forward 8x8 (one luma 8x8 block)
    OP_FWD4 = 2'd1,   // forward 4x4, on four 4x4 blocks side by side
    OP_INV8 = 2'd2,   // inverse 8x8
    OP_INV4 = 2'd3    // inverse 4x4, on four 4x4 blocks
  } xop_e;

  // Shift applied to one term before it is added.
  typedef enum logic [1:0] {
    SH_NONE = 2'd0,
    SH_R1   = 2'd1,   // arithmetic >> 1
    SH_R2   = 2'd2,   // arithmetic >> 2
    SH_L1   = 2'd3    // << 1
  } shift_e;

  typedef struct packed {
    logic       en;     // term takes part in the sum
    logic       neg;    // term is subtracted
    logic [2:0] src;    // which of the 8 line inputs
    shift_e     sh;
  } term_t;

  localparam term_t T0 = '{en: 1'b0, neg: 1'b0, src: 3'd0, sh: SH_NONE};

  function automatic term_t tp(int s, shift_e sh = SH_NONE);
    return '{en: 1'b1, neg: 1'b0, src: 3'(s), sh: sh};
  endfunction

  function automatic term_t tn(int s, shift_e sh = SH_NONE);
    return '{en: 1'b1, neg: 1'b1, src: 3'(s), sh: sh};
  endfunction

  // Number of butterfly stages per line for each flavour.
  function automatic int unsigned num_stages(xop_e op);
    case (op)
      OP_FWD8: return 3;
      OP_FWD4: return 1;
      OP_INV8: return 3;
      default: return 2;   // OP_INV4
    endcase
  endfunction

  function automatic logic is_inverse(xop_e op);
    return op == OP_INV8 || op == OP_INV4;
  endfunction

  function automatic logic is_8x8(xop_e op);
    return op == OP_FWD8 || op == OP_INV8;
  endfunction

  // Term k (0..3) of output lane l in stage st of flavour op.
  function automatic term_t stage_term(xop_e op, int st, int l, int k);
    term_t t [4];
    int b;
    int m;
    t = '{T0, T0, T0, T0};
    b = l & 4;        // 4x4 flavours: lanes 0-3 and 4-7 are two blocks
    m = l & 3;
    case (op)
      OP_FWD4: begin  // y = C1 x
        case (m)
          0: t = '{tp(b+0), tp(b+1), tp(b+2), tp(b+3)};
          1: t = '{tp(b+0, SH_L1), tp(b+1), tn(b+2), tn(b+3, SH_L1)};
          2: t = '{tp(b+0), tn(b+1), tn(b+2), tp(b+3)};
          default: t = '{tp(b+0), tn(b+1, SH_L1), tp(b+2, SH_L1), tn(b+3)};
        endcase
      end
      OP_INV4: begin
        if (st == 0) begin    // e stage
          case (m)
            0: t = '{tp(b+0), tp(b+2), T0, T0};
            1: t = '{tp(b+0), tn(b+2), T0, T0};
            2: t = '{tp(b+1, SH_R1), tn(b+3), T0, T0};
            default: t = '{tp(b+1), tp(b+3, SH_R1), T0, T0};
          endcase
        end else begin        // f stage
          case (m)
            0: t = '{tp(b+0), tp(b+3), T0, T0};
            1: t = '{tp(b+1), tp(b+2), T0, T0};
            2: t = '{tp(b+1), tn(b+2), T0, T0};
            default: t = '{tp(b+0), tn(b+3), T0, T0};
          endcase
        end
      end
      OP_INV8: begin
        if (st == 0) begin    // e stage
          case (l)
            0: t = '{tp(0), tp(4), T0, T0};
            1: t = '{tn(3), tp(5), tn(7), tn(7, SH_R1)};
            2: t = '{tp(0), tn(4), T0, T0};
            3: t = '{tp(1), tp(7), tn(3), tn(3, SH_R1)};
            4: t = '{tp(2, SH_R1), tn(6), T0, T0};
            5: t = '{tn(1), tp(7), tp(5), tp(5, SH_R1)};
            6: t = '{tp(2), tp(6, SH_R1), T0, T0};
            default: t = '{tp(3), tp(5), tp(1), tp(1, SH_R1)};
          endcase
        end else if (st == 1) begin  // f stage
          case (l)
            0: t = '{tp(0), tp(6), T0, T0};
            1: t = '{tp(1), tp(7, SH_R2), T0, T0};
            2: t = '{tp(2), tp(4), T0, T0};
            3: t = '{tp(3), tp(5, SH_R2), T0, T0};
            4: t = '{tp(2), tn(4), T0, T0};
            5: t = '{tp(3, SH_R2), tn(5), T0, T0};
            6: t = '{tp(0), tn(6), T0, T0};
            default: t = '{tp(7), tn(1, SH_R2), T0, T0};
          endcase
        end else begin               // g stage
          case (l)
            0: t = '{tp(0), tp(7), T0, T0};
            1: t = '{tp(2), tp(5), T0, T0};
            2: t = '{tp(4), tp(3), T0, T0};
            3: t = '{tp(6), tp(1), T0, T0};
            4: t = '{tp(6), tn(1), T0, T0};
            5: t = '{tp(4), tn(3), T0, T0};
            6: t = '{tp(2), tn(5), T0, T0};
            default: t = '{tp(0), tn(7), T0, T0};
          endcase
        end
      end
      default: begin  // OP_FWD8
        if (st == 0) begin    // a stage: sums in lanes 0-3, differences in 4-7
          if (l < 4) t = '{tp(l), tp(7-l), T0, T0};
          else       t = '{tp(l-4), tn(11-l), T0, T0};
        end else if (st == 1) begin  // b stage
          case (l)
            0: t = '{tp(0), tp(3), T0, T0};
            1: t = '{tp(1), tp(2), T0, T0};
            2: t = '{tp(0), tn(3), T0, T0};
            3: t = '{tp(1), tn(2), T0, T0};
            4: t = '{tp(5), tp(6), tp(4, SH_R1), tp(4)};
            5: t = '{tp(4), tn(7), tn(6, SH_R1), tn(6)};
            6: t = '{tp(4), tp(7), tn(5, SH_R1), tn(5)};
            default: t = '{tp(5), tn(6), tp(7, SH_R1), tp(7)};
          endcase
        end else begin               // output stage
          case (l)
            0: t = '{tp(0), tp(1), T0, T0};
            1: t = '{tp(4), tp(7, SH_R2), T0, T0};
            2: t = '{tp(2), tp(3, SH_R1), T0, T0};
            3: t = '{tp(5), tp(6, SH_R2), T0, T0};
            4: t = '{tp(0), tn(1), T0, T0};
            5: t = '{tp(6), tn(5, SH_R2), T0, T0};
            6: t = '{tp(2, SH_R1), tn(3), T0, T0};
            default: t = '{tp(4, SH_R2), tn(7), T0, T0};
          endcase
        end
      end
    endcase
    return t[k];
  endfunction

  // ---------------------------------------------------------------- quant
  // Position class of coefficient (i,j) inside a 4x4 block: 0 both even,
  // 1 both odd, 2 mixed.
  function automatic int unsigned pos_class4(int i, int j);
    if ((i % 2 == 0) && (j % 2 == 0)) return 0;
    if ((i % 2 == 1) && (j % 2 == 1)) return 1;
    return 2;
  endfunction

  // Position class of coefficient (i,j) inside an 8x8 block (H.264 8.5.9).
  function automatic int unsigned pos_class8(int i, int j);
    if ((i % 4 == 0) && (j % 4 == 0)) return 0;
    if ((i % 2 == 1) && (j % 2 == 1)) return 1;
    if ((i % 4 == 2) && (j % 4 == 2)) return 2;
    if (((i % 4 == 0) && (j % 2 == 1)) || ((i % 2 == 1) && (j % 4 == 0))) return 3;
    if (((i % 4 == 0) && (j % 4 == 2)) || ((i % 4 == 2) && (j % 4 == 0))) return 4;
    return 5;
  endfunction

  // Forward quantization multiplier MF, 4x4 (qp%6, class).
  function automatic logic [14:0] mf4(int r, int c);
    logic [14:0] t [6][3];
    t = '{'{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
          '{ 9362, 3647, 5825}, '{ 8192, 3355, 5243}, '{ 7282, 2893, 4559}};
    return t[r][c];
  endfunction

  // Rescaling factor V, 4x4 (qp%6, class).
  function automatic logic [5:0] v4(int r, int c);
    logic [5:0] t [6][3];
    t = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
          '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};
    return t[r][c];
  endfunction

  // Forward quantization multiplier, 8x8 (qp%6, class).
  function automatic logic [14:0] mf8(int r, int c);
    logic [14:0] t [6][6];
    t = '{'{13107, 11428, 20972, 12222, 16777, 15481},
          '{11916, 10826, 19174, 11058, 14980, 14290},
          '{10082,  8943, 15978,  9675, 12710, 11985},
          '{ 9362,  8228, 14913,  8931, 11984, 11259},
          '{ 8192,  7346, 13159,  7740, 10486,  9777},
          '{ 7282,  6428, 11570,  6830,  9118,  8640}};
    return t[r][c];
  endfunction

  // Rescaling factor (normAdjust8x8), 8x8 (qp%6, class).
  function automatic logic [5:0] v8(int r, int c);
    logic [5:0] t [6][6];
    t = '{'{20, 18, 32, 19, 25, 24}, '{22, 19, 35, 21, 28, 26},
          '{26, 23, 42, 24, 33, 31}, '{28, 25, 45, 26, 35, 33},
          '{32, 28, 51, 30, 40, 38}, '{36, 32, 58, 34, 46, 43}};
    return t[r][c];
  endfunction

  function automatic coef_t sat16(logic signed [47:0] v);
    if (v > 48'sd32767)  return 16'sd32767;
    if (v < -48'sd32768) return -16'sd32768;
    return coef_t'(v);
  endfunction

endpackage
