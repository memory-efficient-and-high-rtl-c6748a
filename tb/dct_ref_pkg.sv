// dct_ref_pkg: real-valued reference models for the DCT testbenches.
//
// c(m, n) = sqrt(2)*K_m*cos((2n+1)*m*pi/16), K_0 = 1/sqrt(2), K_m = 1 otherwise, is the
// unnormalised 8-point DCT kernel computed by the 1-D processors (sqrt(8) times the
// orthonormal one). Fixed-point words carry FRAC fractional bits.
package dct_ref_pkg;

  localparam real PI = 3.14159265358979323846;
  localparam int FRAC = dct_pkg::FRAC;

  function automatic real kern(input int m, input int n);
    real k;
    k = (m == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return $sqrt(2.0) * k * $cos(real'((2 * n + 1) * m) * PI / 16.0);
  endfunction

  function automatic real to_real(input logic signed [31:0] v);
    return real'(v) / real'(1 << FRAC);
  endfunction

  function automatic logic signed [31:0] to_fix(input real r);
    return 32'($rtoi(r * real'(1 << FRAC) + ((r >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic real absr(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

endpackage
