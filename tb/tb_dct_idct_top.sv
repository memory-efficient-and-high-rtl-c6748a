// tb_dct_idct_top: end-to-end test of the top at its default configuration.
//
// A 512x512 8-bit test image (smooth gradients, sinusoidal texture, sharp edges and noise,
// generated here) is cut into 4096 blocks of 8x8, level-shifted by -128 and streamed row
// by row into the 2-D DCT processor. The DCT output columns are fed straight into the 2-D
// IDCT processor (a column of Z is a row of Z^t, and IDCT(Z^t) = X^t, so the IDCT returns
// the image rows). The testbench checks
//   * every DCT coefficient against a real-valued separable 2-D DCT of its block,
//   * every reconstructed sample against the original (within 0.05),
//   * the PSNR of the rounded reconstructed image (must be above 50 dB),
//   * the output timing: 18 clocks from a block's last row to its first output, per processor,
// and counts the mechanisms of the design, failing if one never happened: the coefficient
// load, blocks written by rows and by columns, input gaps, back-to-back blocks (a block
// completing in the last read clock of the previous one) and the chained DCT-to-IDCT run.
module tb_dct_idct_top;
  import dct_ref_pkg::*;

  localparam int IMG = 512;
  localparam int NB = IMG / 8;
  localparam int LAT = 18;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic dct_in_valid, dct_in_ready, dct_out_valid;
  logic idct_in_valid, idct_in_ready, idct_out_valid;
  logic signed [31:0] dct_in_row [8];
  logic signed [31:0] dct_out_col [8];
  logic signed [31:0] idct_in_row [8];
  logic signed [31:0] idct_out_col [8];

  dct_idct_top dut (.*);

  // chain: DCT output straight into the IDCT input
  assign idct_in_valid = dct_out_valid;
  assign idct_in_row = dct_out_col;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  byte unsigned img [IMG][IMG];
  real coefq [$];      // expected DCT coefficients, column-major per block
  longint tq [$];      // clock of each block's last row
  longint tq2 [$];     // clock of each IDCT input block's last row
  int blkq [$];        // block numbers in flight (for the IDCT output)

  // mechanism counters
  int n_load = 0, n_row_blocks = 0, n_col_blocks = 0, n_gaps = 0, n_b2b = 0, n_chain = 0;
  real sq_err = 0.0;
  real max_err = 0.0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at clock %0d", what, cyc);
    end
  endtask

  function automatic byte unsigned pix(input int r, input int c);
    real v;
    v = 128.0 + 60.0 * $sin(real'(r) / 37.0) * $cos(real'(c) / 23.0) + 0.1 * real'(c - r);
    if (((r / 64) + (c / 64)) % 2 == 0) v += 40.0;          // hard edges
    if ((r % 97) < 3) v = 250.0;                              // thin bright lines
    v += real'($urandom_range(0, 16)) - 8.0;                  // noise
    if (v < 0.0) v = 0.0;
    if (v > 255.0) v = 255.0;
    return 8'($rtoi(v));
  endfunction

  // separable reference 2-D DCT of block (br, bc), pushed column-major
  task automatic push_ref(input int br, input int bc);
    real t1 [8][8];
    for (int m = 0; m < 8; m++)
      for (int v = 0; v < 8; v++) begin
        t1[m][v] = 0.0;
        for (int n = 0; n < 8; n++)
          t1[m][v] += kern(v, n) * (real'(img[br*8+m][bc*8+n]) - 128.0);
      end
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        real acc;
        acc = 0.0;
        for (int m = 0; m < 8; m++) acc += kern(u, m) * t1[m][v];
        coefq.push_back(acc / 8.0);
      end
  endtask

  initial begin
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) img[r][c] = pix(r, c);
    rst_n = 0; dct_in_valid = 0;
    for (int n = 0; n < 8; n++) dct_in_row[n] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (!dct_in_ready) begin
      n_load++;
      @(posedge clk); #1;
    end
    chk(n_load == 6, "coefficient load takes 6 clocks");
    chk(idct_in_ready, "IDCT ready with the DCT");
    for (int b = 0; b < NB * NB; b++) begin
      int br, bc;
      br = b / NB; bc = b % NB;
      for (int m = 0; m < 8; m++) begin
        // every 16th block has random gaps between its rows
        while ((b % 16) == 5 && $urandom_range(0, 1) == 0) begin
          dct_in_valid = 0;
          n_gaps++;
          @(posedge clk); #1;
        end
        dct_in_valid = 1;
        for (int n = 0; n < 8; n++)
          dct_in_row[n] = 32'(int'(img[br*8+m][bc*8+n]) - 128) <<< FRAC;
        if (m == 7) begin
          push_ref(br, bc);
          tq.push_back(cyc);
          blkq.push_back(b);
        end
        @(posedge clk); #1;
      end
      dct_in_valid = 0;
    end
    repeat (80) @(posedge clk);
    chk(tq.size() == 0 && blkq.size() == 0 && coefq.size() == 0, "all blocks came out");
    $display("mechanisms: load=%0d row_blocks=%0d col_blocks=%0d gaps=%0d back_to_back=%0d chained=%0d",
             n_load, n_row_blocks, n_col_blocks, n_gaps, n_b2b, n_chain);
    chk(n_load > 0, "coefficient load");
    chk(n_row_blocks > 0, "row-written blocks");
    chk(n_col_blocks > 0, "column-written blocks");
    chk(n_gaps > 0, "input gaps");
    chk(n_b2b > 0, "back-to-back blocks");
    chk(n_chain == NB * NB, "chained DCT to IDCT blocks");
    begin
      real mse, psnr;
      mse = sq_err / real'(IMG * IMG);
      psnr = (mse > 0.0) ? 10.0 * $log10(255.0 * 255.0 / mse) : 99.0;
      $display("round trip: max |error| = %f, MSE = %g, PSNR = %0.1f dB", max_err, mse, psnr);
      chk(psnr > 50.0, "PSNR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters from the DCT processor's control unit
  always @(posedge clk) begin
    if (dut.u_dct.u_ctrl.we && dut.u_dct.u_ctrl.wr_idx == 3'd7) begin
      if (dut.u_dct.u_ctrl.wr_col) n_col_blocks++;
      else n_row_blocks++;
      if (dut.u_dct.u_ctrl.re && dut.u_dct.u_ctrl.rd_idx == 3'd7) n_b2b++;
    end
  end

  // DCT output monitor
  int dcol = 0;
  always @(posedge clk) begin
    #2;
    if (dct_out_valid) begin
      if (tq.size() == 0) chk(0, "unexpected DCT output");
      else begin
        chk(cyc == tq[0] + LAT + dcol, "DCT output timing");
        for (int u = 0; u < 8; u++) begin
          real e, d;
          e = coefq.pop_front();
          d = absr(to_real(dct_out_col[u]) - e);
          checks++;
          if (d > 0.02 + 1.0e-4 * absr(e) + 0.01) begin
            failures++;
            if (failures < 10) $display("FAIL DCT coef: got %f exp %f", to_real(dct_out_col[u]), e);
          end
        end
        if (dcol == 7) begin
          tq2.push_back(cyc);
          void'(tq.pop_front());
          n_chain++;
        end
        dcol = (dcol + 1) % 8;
      end
    end
  end

  // IDCT output monitor: row m of the original block
  int irow = 0;
  always @(posedge clk) begin
    #3;
    if (idct_out_valid) begin
      if (tq2.size() == 0 || blkq.size() == 0) chk(0, "unexpected IDCT output");
      else begin
        int br, bc;
        br = blkq[0] / NB; bc = blkq[0] % NB;
        chk(cyc == tq2[0] + LAT + irow, "IDCT output timing");
        for (int n = 0; n < 8; n++) begin
          real got, orig, d;
          int rp;
          got = to_real(idct_out_col[n]) + 128.0;
          orig = real'(img[br*8+irow][bc*8+n]);
          d = absr(got - orig);
          if (d > max_err) max_err = d;
          rp = $rtoi(got + 0.5);
          if (rp < 0) rp = 0;
          if (rp > 255) rp = 255;
          sq_err += (real'(rp) - orig) * (real'(rp) - orig);
          checks++;
          if (d > 0.05) begin
            failures++;
            if (failures < 10) $display("FAIL IDCT: got %f exp %f", got, orig);
          end
        end
        if (irow == 7) begin
          void'(tq2.pop_front());
          void'(blkq.pop_front());
        end
        irow = (irow + 1) % 8;
      end
    end
  end

  initial begin
    repeat (NB * NB * 8 + NB * NB * 2 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
