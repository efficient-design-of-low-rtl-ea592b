// xq_engine: shared H.264 integer transform and quantization engine.
//
// One engine serves both the compressor and the decompressor; a control input
// chooses which, and the two differ only in the order in which the adders and
// the multipliers work on the 8x8 register array:
//
//   compressor:   load residual rows -> forward 1-D transform on the rows
//                 -> forward 1-D transform on the columns, each finished
//                    column quantized by the 8 multipliers one clock later
//                 -> (reconstruction path) rescale the rows, each rescaled row
//                    put through the inverse 1-D transform as soon as it is
//                    ready, while the quantized levels stream out row by row
//                 -> inverse 1-D transform on the columns with final rounding
//                 -> reconstructed residual rows stream out
//   decompressor: load level rows -> rescale rows overlapped with inverse row
//                 transform -> inverse column transform -> residual rows out
//
// The adders process one line per stage per clock (shift_add_stage) and write
// it back in place, so a line takes 3 clocks in an 8x8 transform, 1 clock in
// the forward 4x4 and 2 in the inverse 4x4. In 4x4 mode the array holds four
// 4x4 blocks (one chroma component of a macroblock) that are transformed
// together. The multipliers (quant_mult) process one line per clock. A line
// reaches the multipliers only after the adders have finished it (compressor)
// and the adders take a row only after the multipliers have rescaled it
// (decompressor); the controller stalls whichever side is ahead.
//
// Interface timing: pulse start for one clock in IDLE with mode, size, qp and
// intra valid; they are captured. The engine then accepts 8 rows on ld_*
// (valid/ready, row 0 first). lvl_valid marks the 8 quantized rows (compressor
// only), res_valid the 8 reconstructed residual rows (both modes), each row
// for one clock with no back-pressure. done pulses for one clock after the
// last residual row.
// Clocks per region, from the edge that samples start to the edge that
// raises done, with ld_valid held high: 8x8 compressor 115, four-4x4
// compressor 67, 8x8 decompressor 66, four-4x4 decompressor 50. These counts
// are this design's own, not the figures of the original bit-serial design.
module xq_engine
  import h264_xq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        compress,   // 1: compressor, 0: decompressor
  input  logic        sz8,        // 1: one 8x8 block, 0: four 4x4 blocks
  input  logic [5:0]  qp,
  input  logic        intra,
  output logic        busy,
  output logic        done,
  // row input: residuals (compressor) or levels (decompressor)
  input  logic        ld_valid,
  output logic        ld_ready,
  input  coef_t       ld_row [LINE],
  // quantized levels (compressor)
  output logic        lvl_valid,
  output coef_t       lvl_row [LINE],
  // reconstructed residual
  output logic        res_valid,
  output coef_t       res_row [LINE],
  // activity, for observation
  output logic        mult_wait,  // multipliers idle, waiting for the adders
  output logic        add_wait    // adders idle, waiting for the multipliers
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_FROW, S_FCOLQ, S_DQROW, S_ICOL, S_RESOUT
  } state_e;

  state_e      state;
  logic        cmp_q, sz8_q, intra_q;
  logic [5:0]  qp_q;
  logic [3:0]  a_line;     // line the adders are on (0..8)
  logic [1:0]  a_st;       // stage within the line
  logic [3:0]  m_line;     // lines finished by the multipliers (0..8)
  logic [3:0]  cnt;        // load / read-out row counter

  xop_e        op;
  logic [1:0]  last_st;

  // register array ports
  logic        a_col, a_we, m_col, m_we, ld_en;
  logic [2:0]  a_idx, m_idx, o_row;
  coef_t       a_rdata [LINE], a_wdata [LINE];
  coef_t       m_rdata [LINE], m_wdata [LINE];
  coef_t       o_rdata [LINE];
  logic        rnd;

  always_comb begin
    case ({state == S_FROW || state == S_FCOLQ, sz8_q})
      2'b11:   op = OP_FWD8;
      2'b10:   op = OP_FWD4;
      2'b01:   op = OP_INV8;
      default: op = OP_INV4;
    endcase
    last_st = 2'(num_stages(op) - 1);
  end

  // which side may work this clock
  logic a_act, m_act;
  always_comb begin
    a_act = 1'b0;
    m_act = 1'b0;
    case (state)
      S_FROW, S_ICOL: a_act = a_line < 4'd8;
      S_FCOLQ: begin
        a_act = a_line < 4'd8;
        m_act = m_line < a_line;                 // only finished columns
      end
      S_DQROW: begin
        m_act = m_line < 4'd8;
        a_act = (a_line < 4'd8) && (a_line < m_line); // only rescaled rows
      end
      default: ;
    endcase
  end

  assign mult_wait = (state == S_FCOLQ) && !m_act && (m_line < 4'd8);
  assign add_wait  = (state == S_DQROW) && !a_act && (a_line < 4'd8);

  always_comb begin
    a_col = (state == S_FCOLQ) || (state == S_ICOL);
    m_col = (state == S_FCOLQ);
    a_idx = a_line[2:0];
    m_idx = m_line[2:0];
    a_we  = a_act;
    m_we  = m_act;
    rnd   = (state == S_ICOL) && (a_st == last_st);
    ld_en = (state == S_LOAD) && ld_valid;
    o_row = cnt[2:0];
  end

  coef_regs u_regs (
    .clk, .rst_n,
    .ld_en, .ld_row(cnt[2:0]), .ld_data(ld_row),
    .a_col, .a_idx, .a_rdata, .a_we, .a_wdata,
    .m_col, .m_idx, .m_rdata, .m_we, .m_wdata,
    .o_row, .o_rdata
  );

  shift_add_stage u_add (
    .op, .st(a_st), .rnd, .din(a_rdata), .dout(a_wdata)
  );

  quant_mult u_mult (
    .inv(state == S_DQROW), .sz8(sz8_q), .qp(qp_q), .intra(intra_q),
    .col(m_col), .idx(m_idx), .din(m_rdata), .dout(m_wdata)
  );

  assign ld_ready  = (state == S_LOAD);
  assign busy      = (state != S_IDLE);
  assign lvl_valid = (state == S_DQROW) && m_act && cmp_q;
  assign lvl_row   = m_rdata;
  assign res_valid = (state == S_RESOUT);
  assign res_row   = o_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cmp_q   <= 1'b0;
      sz8_q   <= 1'b0;
      intra_q <= 1'b0;
      qp_q    <= '0;
      a_line  <= '0;
      a_st    <= '0;
      m_line  <= '0;
      cnt     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (a_act) begin
        if (a_st == last_st) begin
          a_st   <= '0;
          a_line <= a_line + 4'd1;
        end else begin
          a_st <= a_st + 2'd1;
        end
      end
      if (m_act) m_line <= m_line + 4'd1;

      case (state)
        S_IDLE: if (start) begin
          cmp_q   <= compress;
          sz8_q   <= sz8;
          qp_q    <= qp;
          intra_q <= intra;
          cnt     <= '0;
          state   <= S_LOAD;
        end
        S_LOAD: if (ld_valid) begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd7) begin
            a_line <= '0; a_st <= '0; m_line <= '0;
            state  <= cmp_q ? S_FROW : S_DQROW;
          end
        end
        S_FROW: if (a_act && a_st == last_st && a_line == 4'd7) begin
          a_line <= '0; a_st <= '0; m_line <= '0;
          state  <= S_FCOLQ;
        end
        S_FCOLQ: if (m_act && m_line == 4'd7) begin
          a_line <= '0; a_st <= '0; m_line <= '0;
          state  <= S_DQROW;
        end
        S_DQROW: if (a_act && a_st == last_st && a_line == 4'd7) begin
          a_line <= '0; a_st <= '0; m_line <= '0;
          state  <= S_ICOL;
        end
        S_ICOL: if (a_act && a_st == last_st && a_line == 4'd7) begin
          cnt   <= '0;
          state <= S_RESOUT;
        end
        S_RESOUT: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd7) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The adder and multiplier write-backs must never hit the same line.
  a_no_clash: assert property (@(posedge clk) disable iff (!rst_n)
    (a_we && m_we) |-> (a_idx != m_idx));

endmodule
