// dct_idct_top: the CORDIC-based 8x8 2-D DCT processor and 2-D IDCT processor side by side.
//
// Both are instances of xform2d (see there for the architecture and timing): the DCT takes
// image rows and returns columns of DCT coefficients, the IDCT takes coefficient rows and
// returns columns of samples, each at 8 words per clock. They share only clock and reset;
// each has its own ports, so they can be used as an encoder and a decoder separately, or
// chained (dct_out_* into idct_in_*) for a DCT/IDCT round trip that returns the image rows.
// Words are 32-bit two's complement with 12 fractional bits (dct_pkg).
module dct_idct_top
  import dct_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // 2-D DCT processor
  input  logic                     dct_in_valid,
  output logic                     dct_in_ready,
  input  logic signed [DATA_W-1:0] dct_in_row  [8],
  output logic                     dct_out_valid,
  output logic signed [DATA_W-1:0] dct_out_col [8],
  // 2-D IDCT processor
  input  logic                     idct_in_valid,
  output logic                     idct_in_ready,
  input  logic signed [DATA_W-1:0] idct_in_row  [8],
  output logic                     idct_out_valid,
  output logic signed [DATA_W-1:0] idct_out_col [8]
);

  xform2d #(.INVERSE(1'b0), .W(DATA_W)) u_dct (
    .clk, .rst_n,
    .in_valid(dct_in_valid), .in_ready(dct_in_ready), .in_row(dct_in_row),
    .out_valid(dct_out_valid), .out_col(dct_out_col)
  );

  xform2d #(.INVERSE(1'b1), .W(DATA_W)) u_idct (
    .clk, .rst_n,
    .in_valid(idct_in_valid), .in_ready(idct_in_ready), .in_row(idct_in_row),
    .out_valid(idct_out_valid), .out_col(idct_out_col)
  );

endmodule
