// tb_tpose_sram: random row/column line writes and reads against an 8x8 reference array,
// including reads and writes of the same words in the same clock (the read must return
// the old contents) and the one-clock registered read latency.
module tb_tpose_sram;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we, wr_col, re, rd_col;
  logic [2:0] wr_idx, rd_idx;
  logic signed [31:0] wr_data [8];
  logic signed [31:0] rd_data [8];
  int checks = 0, failures = 0;

  tpose_sram dut (.clk, .we, .wr_col, .wr_idx, .wr_data, .re, .rd_col, .rd_idx, .rd_data);

  logic signed [31:0] ref_mem [8][8];  // [row][col]
  logic signed [31:0] exp_rd [8];

  initial begin
    we = 0; re = 0; wr_col = 0; rd_col = 0; wr_idx = 0; rd_idx = 0;
    for (int k = 0; k < 8; k++) wr_data[k] = 0;
    // fill every row first so that every word is defined
    for (int r = 0; r < 8; r++) begin
      we = 1; wr_col = 0; wr_idx = 3'(r);
      for (int k = 0; k < 8; k++) begin
        wr_data[k] = $urandom;
        ref_mem[r][k] = wr_data[k];
      end
      @(posedge clk); #1;
    end
    for (int t = 0; t < 2000; t++) begin
      bit do_rd;
      we = $urandom_range(0, 1);
      wr_col = $urandom_range(0, 1);
      wr_idx = $urandom_range(0, 7);
      do_rd = $urandom_range(0, 3) != 0;
      re = do_rd;
      rd_col = $urandom_range(0, 1);
      // often read the very line being written
      rd_idx = ($urandom_range(0, 1) != 0) ? wr_idx : 3'($urandom_range(0, 7));
      if ($urandom_range(0, 1) != 0) rd_col = wr_col;
      for (int k = 0; k < 8; k++) wr_data[k] = $urandom;
      for (int k = 0; k < 8; k++)
        exp_rd[k] = rd_col ? ref_mem[k][rd_idx] : ref_mem[rd_idx][k];
      if (we)
        for (int k = 0; k < 8; k++)
          if (wr_col) ref_mem[k][wr_idx] = wr_data[k];
          else        ref_mem[wr_idx][k] = wr_data[k];
      @(posedge clk); #1;
      if (do_rd) begin
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (rd_data[k] !== exp_rd[k]) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d k=%0d got %h exp %h", t, k, rd_data[k], exp_rd[k]);
          end
        end
      end else begin
        // rd_data holds its value when re = 0
        logic signed [31:0] held [8];
        held = rd_data;
        re = 0;
        @(posedge clk); #1;
        checks++;
        if (rd_data != held) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
