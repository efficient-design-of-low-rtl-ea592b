// coef_regs: the 8x8 array of 16-bit registers that holds one 8x8 region of
// samples, intermediate transform values and final coefficients.
//
// Every line access goes through the "first stage multiplexing": a port
// addresses either row n (a_col / m_col = 0) or column n (= 1), depending on
// which 1-D transform is running. There are two read ports (one for the adder
// stage, one for the multipliers), a row read port for streaming results out,
// and three write ports: a row load port for new data, the adder write-back
// and the multiplier write-back. The two write-backs address the same kind
// of line (both rows or both columns) in any one pass; they write different
// lines in the same clock, and the multiplier write wins on a clash.
// Reads are combinational; writes take effect at the rising clock edge.
// Reset clears the array. The 8x8 x 16-bit array and its row/column
// selection are those of the architecture; the number of ports and the clash
// rule are this design's choice.
module coef_regs
  import h264_xq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // row load
  input  logic        ld_en,
  input  logic [2:0]  ld_row,
  input  coef_t       ld_data [LINE],
  // adder port
  input  logic        a_col,
  input  logic [2:0]  a_idx,
  output coef_t       a_rdata [LINE],
  input  logic        a_we,
  input  coef_t       a_wdata [LINE],
  // multiplier port
  input  logic        m_col,
  input  logic [2:0]  m_idx,
  output coef_t       m_rdata [LINE],
  input  logic        m_we,
  input  coef_t       m_wdata [LINE],
  // row read-out
  input  logic [2:0]  o_row,
  output coef_t       o_rdata [LINE]
);

  coef_t r [LINE][LINE];   // r[row][col]

  always_comb begin
    for (int k = 0; k < LINE; k++) begin
      a_rdata[k] = a_col ? r[k][a_idx] : r[a_idx][k];
      m_rdata[k] = m_col ? r[k][m_idx] : r[m_idx][k];
      o_rdata[k] = r[o_row][k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LINE; i++)
        for (int j = 0; j < LINE; j++)
          r[i][j] <= '0;
    end else begin
      if (ld_en)
        for (int k = 0; k < LINE; k++) r[ld_row][k] <= ld_data[k];
      if (a_we)
        for (int k = 0; k < LINE; k++)
          if (a_col) r[k][a_idx] <= a_wdata[k];
          else       r[a_idx][k] <= a_wdata[k];
      if (m_we)
        for (int k = 0; k < LINE; k++)
          if (m_col) r[k][m_idx] <= m_wdata[k];
          else       r[m_idx][k] <= m_wdata[k];
    end
  end

endmodule
