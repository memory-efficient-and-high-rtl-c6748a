// tb_dct1d: checks dct1d against the real-valued unnormalised 8-point transform
// (y_out[m] = sum_n c(m,n)*x_in[n]) for random vectors, with idle clocks mixed in,
// and checks that every result appears exactly 8 clocks after its input (out_valid too).
module tb_dct1d;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int LAT = 8;
  localparam int NCYC = 600;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  coef_set_t coef;
  logic in_valid, out_valid;
  logic signed [31:0] x_in [8];
  logic signed [31:0] y_out [8];
  int checks = 0, failures = 0;

  dct1d dut (.clk, .rst_n, .coef, .in_valid, .x_in, .out_valid, .y_out);

  real expq [$];
  bit  vq [$];
  real magq [$];  // sum of |inputs|: the CORDIC angle error scales with it

  initial begin
    coef.r1.sigma = 32'h0000_7216; coef.r1.comp = 32'h4cc0_30c1;
    coef.r5.sigma = 32'h0000_6e8c; coef.r5.comp = 32'h4cc0_30c1;
    coef.r6.sigma = 32'h0000_0b24; coef.r6.comp = 32'h4cc0_30c1;
    rst_n = 0; in_valid = 0;
    for (int n = 0; n < 8; n++) x_in[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NCYC + LAT; t++) begin
      real e [8];
      logic signed [31:0] vin [8];
      in_valid = (t < NCYC) && ($urandom_range(0, 9) != 0);
      for (int n = 0; n < 8; n++) begin
        // samples up to +-2048 in real terms; every 13th vector at full range
        vin[n] = (t % 13 == 0) ? 32'($signed($urandom_range(0, 1 << 24)) - (1 << 23))
                               : 32'($signed($urandom_range(0, 1 << 20)) - (1 << 19));
        x_in[n] = vin[n];
      end
      for (int m = 0; m < 8; m++) begin
        e[m] = 0.0;
        for (int n = 0; n < 8; n++) e[m] += kern(m, n) * to_real(vin[n]);
      end
      for (int m = 0; m < 8; m++) expq.push_back(e[m]);
      vq.push_back(in_valid);
      magq.push_back(0.0);
      for (int n = 0; n < 8; n++) magq[$] += absr(to_real(vin[n]));
      @(posedge clk);
      #1;
      if (t >= LAT - 1) begin
        real ee [8];
        bit ev;
        real mag;
        for (int m = 0; m < 8; m++) ee[m] = expq.pop_front();
        ev = vq.pop_front();
        mag = magq.pop_front();
        checks++;
        if (out_valid !== ev) begin
          failures++;
          $display("FAIL valid at t=%0d: got %0b exp %0b", t, out_valid, ev);
        end
        if (ev) begin
          for (int m = 0; m < 8; m++) begin
            checks++;
            if (absr(to_real(y_out[m]) - ee[m]) > 0.05 + 3.0e-5 * mag) begin
              failures++;
              if (failures < 10)
                $display("FAIL t=%0d out[%0d]: got %f exp %f", t, m, to_real(y_out[m]), ee[m]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
