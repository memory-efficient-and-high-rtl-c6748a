// xform2d: 8x8 2-D DCT processor (INVERSE = 0) or 2-D IDCT processor (INVERSE = 1).
//
// The 2-D transform is separable: 2-D DCT(X) = 1-D DCT((1-D DCT(X))^t), and likewise for
// the IDCT. The processor is two 8-point 1-D processors in a row with a single 64-word
// transpose bank between them:
//   P1 (input processor) transforms one row of the block per clock and writes the result
//      into the bank, as a row for one block and as a column for the next;
//   P2 (output processor) reads the bank in the other orientation, one line per clock, and
//      transforms it, so each of its outputs is one column of the 2-D result;
//   the control unit loads the six coefficient-ROM words after reset and sequences it all.
// This structure (one 64-word bank, a 6-word ROM, two 1-D processors, alternating row and
// column access, 8 samples per clock in and out) follows the document. The final 3-bit
// shift that removes the factor 8 of the two unnormalised 1-D passes is this design's.
//
// Interface: in_row[n] = x(m, n) for the block row m presented in that clock; rows of a
// block are presented in order m = 0..7, with in_valid = 1 and in_ready = 1, gaps allowed
// between any two rows. out_col[u] = Z(u, v) for the output column v; the eight columns of a
// block leave in order v = 0..7 on eight consecutive clocks with out_valid = 1. There is no
// output back-pressure. Words are DATA_W-bit two's complement, FRAC fractional bits.
// Timing: in_ready is low for 6 clocks after reset (coefficient load). The last row of a
// block entering in clock t gives its first output column in clock t+18 (8 clocks of P1,
// 1 write, 1 registered read, 8 clocks of P2) and its last in clock t+25; one block every
// 8 clocks is sustained.
//
// Feeding the output of the DCT processor straight into the IDCT processor works without a
// reorder buffer: the DCT's columns of Z are rows of Z^t, and IDCT(Z^t) = X^t, whose columns
// are the rows of X.
module xform2d
  import dct_pkg::*;
#(
  parameter bit INVERSE = 1'b0,
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_row  [8],
  output logic                out_valid,
  output logic signed [W-1:0] out_col [8]
);

  coef_set_t coef;
  logic [2:0] rom_addr;
  logic [31:0] rom_data;

  logic p1_valid, p2_valid;
  logic signed [W-1:0] p1_out [8];
  logic signed [W-1:0] p2_in  [8];
  logic signed [W-1:0] p2_out [8];
  logic we, wr_col, re, rd_col, re_q;
  logic [2:0] wr_idx, rd_idx;

  coef_rom u_rom (.addr(rom_addr), .rdata(rom_data));

  ctrl_unit u_ctrl (
    .clk, .rst_n, .rom_addr, .rom_data, .coef, .in_ready,
    .p1_valid, .we, .wr_col, .wr_idx, .re, .rd_col, .rd_idx
  );

  if (INVERSE) begin : g_idct
    idct1d #(.W(W)) u_p1 (.clk, .rst_n, .coef, .in_valid(in_valid && in_ready),
                          .y_in(in_row), .out_valid(p1_valid), .x_out(p1_out));
    idct1d #(.W(W)) u_p2 (.clk, .rst_n, .coef, .in_valid(re_q),
                          .y_in(p2_in), .out_valid(p2_valid), .x_out(p2_out));
  end else begin : g_dct
    dct1d #(.W(W)) u_p1 (.clk, .rst_n, .coef, .in_valid(in_valid && in_ready),
                         .x_in(in_row), .out_valid(p1_valid), .y_out(p1_out));
    dct1d #(.W(W)) u_p2 (.clk, .rst_n, .coef, .in_valid(re_q),
                         .x_in(p2_in), .out_valid(p2_valid), .y_out(p2_out));
  end

  tpose_sram #(.W(W)) u_sram (
    .clk, .we, .wr_col, .wr_idx, .wr_data(p1_out),
    .re, .rd_col, .rd_idx, .rd_data(p2_in)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) re_q <= 1'b0;
    else        re_q <= re;
  end

  // two unnormalised 1-D passes scale by 8
  always_comb begin
    for (int k = 0; k < 8; k++) out_col[k] = p2_out[k] >>> 3;
  end
  assign out_valid = p2_valid;

endmodule
