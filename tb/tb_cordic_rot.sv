// tb_cordic_rot: checks cordic_rot against sqrt(2)*rotation computed in real arithmetic,
// for the three angles pi/16, 5pi/16 and 6pi/16, with random vectors fed every clock, and
// checks that each result appears exactly STAGES (5) clocks after its input.
module tb_cordic_rot;
  import dct_ref_pkg::*;

  localparam int LAT = 5;
  localparam int NVEC = 300;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] sigma, comp;
  logic signed [31:0] x_in, y_in, x_out, y_out;
  int checks = 0, failures = 0;

  cordic_rot dut (.clk, .sigma, .comp, .x_in, .y_in, .x_out, .y_out);

  // direction words for pi/16, 5pi/16, 6pi/16 and the compensation word sqrt(2)/K
  logic [31:0] sig_tab [3] = '{32'h0000_7216, 32'h0000_6e8c, 32'h0000_0b24};
  real ang_tab [3];
  real ex [$], ey [$];

  initial begin
    ang_tab[0] = PI / 16.0; ang_tab[1] = 5.0 * PI / 16.0; ang_tab[2] = 6.0 * PI / 16.0;
    comp = 32'h4cc0_30c1;
    for (int a = 0; a < 3; a++) begin
      sigma = sig_tab[a];
      ex.delete(); ey.delete();
      for (int t = 0; t < NVEC + LAT; t++) begin
        real xr, yr;
        if (t < NVEC) begin
          // magnitudes up to about 4096 in real terms, some tiny
          x_in = (t % 7 == 0) ? 32'($signed($urandom_range(0, 2000)) - 1000)
                              : 32'($signed($urandom_range(0, 1 << 25)) - (1 << 24));
          y_in = 32'($signed($urandom_range(0, 1 << 25)) - (1 << 24));
          xr = to_real(x_in); yr = to_real(y_in);
          ex.push_back($sqrt(2.0) * ($cos(ang_tab[a]) * xr - $sin(ang_tab[a]) * yr));
          ey.push_back($sqrt(2.0) * ($sin(ang_tab[a]) * xr + $cos(ang_tab[a]) * yr));
        end
        @(posedge clk);
        #1;
        if (t >= LAT - 1 && t - (LAT - 1) < NVEC) begin
          real exv, eyv, tol;
          exv = ex.pop_front(); eyv = ey.pop_front();
          tol = 0.02 + 1.0e-4 * (absr(exv) + absr(eyv));
          checks++;
          if (absr(to_real(x_out) - exv) > tol || absr(to_real(y_out) - eyv) > tol) begin
            failures++;
            if (failures < 10)
              $display("FAIL angle %0d vec %0d: got (%f,%f) exp (%f,%f)", a, t - LAT + 1,
                       to_real(x_out), to_real(y_out), exv, eyv);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
