// tb_xform2d: checks the 2-D processor in both configurations, a DCT instance and an IDCT
// instance fed with the same stream of random 8x8 blocks (rows with random gaps, and runs
// of back-to-back blocks), with full-scale constant and checkerboard blocks mixed in.
// Each output column is compared with the real-valued 2-D transform of its block, and its
// clock with the expected timing: column v of a block leaves exactly 18+v clocks after the
// block's last row entered. in_ready must be low for the 6 clocks of the coefficient load,
// and rows offered then must be ignored.
module tb_xform2d;
  import dct_ref_pkg::*;

  localparam int NBLK = 60;
  localparam int LAT = 18;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic in_valid;
  logic signed [31:0] in_row [8];
  logic rdy [2];
  logic ov [2];
  logic signed [31:0] oc [2][8];
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  xform2d #(.INVERSE(1'b0)) u_dct (.clk, .rst_n, .in_valid, .in_ready(rdy[0]), .in_row,
                                   .out_valid(ov[0]), .out_col(oc[0]));
  xform2d #(.INVERSE(1'b1)) u_idct (.clk, .rst_n, .in_valid, .in_ready(rdy[1]), .in_row,
                                    .out_valid(ov[1]), .out_col(oc[1]));

  // expected results: per instance a queue of 64 reals per block (column-major) + end time
  real    expv [2][$];
  longint expt [2][$];
  real    magv [$];

  task automatic chk(input bit ok);
    checks++;
    if (!ok) failures++;
  endtask

  // reference: Z(u,v) = 1/8 sum c(u,m) c(v,n) X(m,n); IDCT uses the transposed kernel
  task automatic push_ref(input real blk [8][8], input longint t_last);
    real mag;
    mag = 0.0;
    for (int m = 0; m < 8; m++) for (int n = 0; n < 8; n++) mag += absr(blk[m][n]);
    for (int inv = 0; inv < 2; inv++) begin
      for (int v = 0; v < 8; v++)
        for (int u = 0; u < 8; u++) begin
          real acc;
          acc = 0.0;
          for (int m = 0; m < 8; m++)
            for (int n = 0; n < 8; n++)
              acc += (inv ? kern(m, u) * kern(n, v) : kern(u, m) * kern(v, n)) * blk[m][n];
          expv[inv].push_back(acc / 8.0);
        end
      expt[inv].push_back(t_last);
    end
    magv.push_back(mag);
  endtask

  initial begin
    real blk [8][8];
    rst_n = 0; in_valid = 0;
    for (int n = 0; n < 8; n++) in_row[n] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // rows offered during the coefficient load must be ignored
    for (int t = 0; t < 6; t++) begin
      chk(rdy[0] == 0 && rdy[1] == 0);
      in_valid = 1;
      for (int n = 0; n < 8; n++) in_row[n] = $urandom;
      @(posedge clk); #1;
    end
    in_valid = 0;
    chk(rdy[0] == 1 && rdy[1] == 1);
    for (int b = 0; b < NBLK; b++) begin
      bit gaps;
      gaps = (b % 10) >= 6;   // blocks 6..9 of every ten have gaps
      for (int m = 0; m < 8; m++) begin
        while (gaps && $urandom_range(0, 2) == 0) begin
          in_valid = 0;
          @(posedge clk); #1;
        end
        in_valid = 1;
        for (int n = 0; n < 8; n++) begin
          if (b % 10 == 3)      // full-scale checkerboard: largest high-frequency term
            in_row[n] = (((m + n) % 2) != 0) ? (255 <<< FRAC) : -(256 <<< FRAC);
          else if (b % 10 == 4) // full-scale constant: largest DC term
            in_row[n] = ((b / 10) % 2 != 0) ? (255 <<< FRAC) : -(256 <<< FRAC);
          else
            in_row[n] = 32'($signed($urandom_range(0, 512 << FRAC)) - (256 << FRAC));
          blk[m][n] = to_real(in_row[n]);
        end
        if (m == 7) push_ref(blk, cyc);
        @(posedge clk); #1;
      end
      in_valid = 0;
    end
    in_valid = 0;
    repeat (40) @(posedge clk);
    chk(expt[0].size() == 0 && expt[1].size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitors
  for (genvar inv = 0; inv < 2; inv++) begin : g_mon
    int col = 0;
    int mi = 0;
    always @(posedge clk) begin
      #2;
      if (ov[inv]) begin
        if (expt[inv].size() == 0) begin
          chk(0);
          $display("FAIL %0d: unexpected output", inv);
        end else begin
          real tol;
          tol = 0.02 + 2.0e-5 * magv[mi];
          chk(cyc == expt[inv][0] + LAT + col);
          for (int u = 0; u < 8; u++) begin
            real e;
            e = expv[inv].pop_front();
            checks++;
            if (absr(to_real(oc[inv][u]) - e) > tol) begin
              failures++;
              if (failures < 10) $display("FAIL inv=%0d col %0d row %0d: got %f exp %f",
                                          inv, col, u, to_real(oc[inv][u]), e);
            end
          end
          col++;
          if (col == 8) begin
            col = 0;
            mi++;
            void'(expt[inv].pop_front());
          end
        end
      end
    end
  end

  initial begin
    repeat (NBLK * 20 + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
