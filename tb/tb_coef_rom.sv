// tb_coef_rom: recomputes the ROM contents independently in real arithmetic.
// For each angle (pi/16, 5pi/16, 6pi/16) it runs the rotation-mode CORDIC angle recursion
// z_{i+1} = z_i - sigma_i*atan(2^-i) for 15 steps to get the expected direction word; it
// checks that every compensation word, read as signed digits, is within 2^-15 of
// sqrt(2)/K, and that the unused addresses read 0.
module tb_coef_rom;
  import dct_ref_pkg::*;

  logic [2:0] addr;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  coef_rom dut (.addr, .rdata);

  initial begin
    real th [3];
    real kgain, target, val, z;
    logic [31:0] sig;
    th[0] = PI / 16.0; th[1] = 5.0 * PI / 16.0; th[2] = 6.0 * PI / 16.0;
    kgain = 1.0;
    for (int i = 0; i < 15; i++) kgain *= $sqrt(1.0 + $pow(2.0, -2.0 * i));
    target = $sqrt(2.0) / kgain;
    for (int a = 0; a < 3; a++) begin
      z = th[a];
      sig = '0;
      for (int i = 0; i < 15; i++) begin
        if (z < 0.0) begin
          sig[i] = 1'b1;
          z += $atan($pow(2.0, -1.0 * i));
        end else begin
          z -= $atan($pow(2.0, -1.0 * i));
        end
      end
      addr = 3'(2 * a); #1;
      checks++;
      if (rdata !== sig) begin
        failures++;
        $display("FAIL sigma %0d: got %h exp %h", a, rdata, sig);
      end
      addr = 3'(2 * a + 1); #1;
      val = 0.0;
      for (int j = 0; j < 16; j++) begin
        if (rdata[2*j+:2] == 2'b01) val += $pow(2.0, -1.0 * j);
        if (rdata[2*j+:2] == 2'b11) val -= $pow(2.0, -1.0 * j);
        if (rdata[2*j+:2] == 2'b10) failures++;
      end
      checks++;
      if (absr(val - target) > $pow(2.0, -15.0)) begin
        failures++;
        $display("FAIL comp %0d: %f vs %f", a, val, target);
      end
    end
    for (int a = 6; a < 8; a++) begin
      addr = 3'(a); #1;
      checks++;
      if (rdata !== 32'h0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
