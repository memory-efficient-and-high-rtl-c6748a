// tb_ctrl_unit: drives the control unit (with the coefficient ROM attached) with random
// streams of P1 output lines and checks it clock by clock against a reference model:
// the 6-clock coefficient load and the loaded words, in_ready, the write line index and the
// row/column orientation flipping after every 8 lines, and the 8-clock read burst that must
// start the clock after a block is complete, in the other orientation.
module tb_ctrl_unit;
  import dct_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [2:0] rom_addr, wr_idx, rd_idx;
  logic [31:0] rom_data;
  coef_set_t coef;
  logic in_ready, p1_valid, we, wr_col, re, rd_col;
  int checks = 0, failures = 0;
  int bursts = 0, back_to_back = 0;

  coef_rom u_rom (.addr(rom_addr), .rdata(rom_data));
  ctrl_unit dut (.clk, .rst_n, .rom_addr, .rom_data, .coef, .in_ready, .p1_valid,
                 .we, .wr_col, .wr_idx, .re, .rd_col, .rd_idx);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference state
  int m_wr_idx, m_rd_left, m_rd_idx;
  bit m_wr_col, m_rd_col;

  initial begin
    rst_n = 0; p1_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      chk(in_ready == 0, "in_ready low during load");
      chk(we == 0 && re == 0, "no access during load");
      @(posedge clk); #1;
    end
    chk(in_ready == 1, "in_ready after load");
    chk(coef.r1.sigma == 32'h0000_7216 && coef.r5.sigma == 32'h0000_6e8c &&
        coef.r6.sigma == 32'h0000_0b24, "direction words loaded");
    chk(coef.r1.comp == 32'h4cc0_30c1 && coef.r5.comp == 32'h4cc0_30c1 &&
        coef.r6.comp == 32'h4cc0_30c1, "compensation words loaded");
    m_wr_idx = 0; m_wr_col = 0; m_rd_left = 0; m_rd_idx = 0; m_rd_col = 0;
    for (int t = 0; t < 3000; t++) begin
      bit done;
      // phases of dense and sparse traffic
      p1_valid = ((t / 200) % 2 == 0) ? 1'b1 : ($urandom_range(0, 2) == 0);
      #1;
      chk(we == p1_valid, "we");
      if (p1_valid) chk(wr_idx == 3'(m_wr_idx) && wr_col == m_wr_col, "write line/orientation");
      chk(re == (m_rd_left > 0), "re");
      if (m_rd_left > 0) chk(rd_idx == 3'(m_rd_idx) && rd_col == m_rd_col, "read line/orientation");
      // advance the model
      done = p1_valid && m_wr_idx == 7;
      if (m_rd_left > 0) begin m_rd_left--; m_rd_idx++; end
      if (done && m_rd_left == 0 && re) back_to_back++;
      if (done) begin
        m_rd_left = 8; m_rd_idx = 0; m_rd_col = !m_wr_col; bursts++;
      end
      if (p1_valid) begin
        m_wr_idx = (m_wr_idx + 1) % 8;
        if (done) m_wr_col = !m_wr_col;
      end
      @(posedge clk); #1;
    end
    chk(bursts > 100, "read bursts happened");
    chk(back_to_back > 10, "back-to-back blocks happened");
    $display("bursts=%0d back_to_back=%0d", bursts, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
