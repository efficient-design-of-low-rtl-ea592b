// tb_coef_regs: self-checking testbench of the 8x8 register array.
//
// Issues random row loads and random row/column write-backs on the adder and
// multiplier ports (up to three writes per clock, to different lines), keeps a
// shadow copy of the array, and checks every read port, in row and in column
// orientation, against the shadow after every clock. Also checks reset.
module tb_coef_regs;
  import h264_xq_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       ld_en, a_col, a_we, m_col, m_we;
  logic [2:0] ld_row, a_idx, m_idx, o_row;
  coef_t      ld_data [LINE], a_rdata [LINE], a_wdata [LINE];
  coef_t      m_rdata [LINE], m_wdata [LINE], o_rdata [LINE];

  coef_regs dut (.*);

  int checks = 0, failures = 0;
  int sh [8][8];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic check_reads();
    for (int p = 0; p < 8; p++) begin
      a_col = p[0]; a_idx = 3'(p); m_col = ~p[0]; m_idx = 3'(7 - p); o_row = 3'(p);
      #1;
      for (int k = 0; k < 8; k++) begin
        check(int'(a_rdata[k]) == (a_col ? sh[k][p] : sh[p][k]), "adder read port");
        check(int'(m_rdata[k]) == (m_col ? sh[k][7-p] : sh[7-p][k]), "multiplier read port");
        check(int'(o_rdata[k]) == sh[p][k], "row read-out port");
      end
    end
  endtask

  initial begin
    bit c;
    int la, lm, lr;
    ld_en = 0; a_we = 0; m_we = 0; a_col = 0; m_col = 0; a_idx = 0; m_idx = 0; ld_row = 0; o_row = 0;
    for (int k = 0; k < 8; k++) begin ld_data[k] = '0; a_wdata[k] = '0; m_wdata[k] = '0; end
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) sh[i][j] = 0;
    #12;
    check_reads();
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      c  = $urandom_range(0, 1);
      la = $urandom_range(0, 7);
      lm = (la + int'($urandom_range(1, 7))) % 8;
      lr = $urandom_range(0, 7);
      ld_en = (n < 8) || ($urandom_range(0, 3) == 0);
      a_we  = (n >= 8) && $urandom_range(0, 1);
      m_we  = (n >= 8) && $urandom_range(0, 1);
      if (ld_en) begin       // keep the load off lines that a write-back crosses
        a_we = 1'b0; m_we = 1'b0;
      end
      ld_row = (n < 8) ? 3'(n) : 3'(lr);
      a_col = c; m_col = c; a_idx = 3'(la); m_idx = 3'(lm);
      for (int k = 0; k < 8; k++) begin
        ld_data[k] = coef_t'($urandom);
        a_wdata[k] = coef_t'($urandom);
        m_wdata[k] = coef_t'($urandom);
      end
      for (int k = 0; k < 8; k++) begin
        if (ld_en) sh[ld_row][k] = int'(ld_data[k]);
        if (a_we) begin if (c) sh[k][la] = int'(a_wdata[k]); else sh[la][k] = int'(a_wdata[k]); end
        if (m_we) begin if (c) sh[k][lm] = int'(m_wdata[k]); else sh[lm][k] = int'(m_wdata[k]); end
      end
      @(posedge clk);
      #1;
      ld_en = 0; a_we = 0; m_we = 0;
      check_reads();
    end
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
