// tpose_sram: the single 64-word transpose memory between the two 1-D processors.
//
// The 64 words form an 8x8 array. Each clock the input processor may write one line of
// eight words and the output processor may read one line of eight words; a line is either
// a row (col = 0: words idx*8 .. idx*8+7) or a column (col = 1: words k*8+idx, k = 0..7).
// Because blocks are written alternately by rows and by columns and each is read in the
// other orientation, a single bank is enough: the line read in a clock is exactly the line
// the next block overwrites in that clock or later.
// One 64-word bank with line-wide row or column access follows the document; building it
// as a register array with one write and one read line port is this design's choice.
//
// Timing: the write happens at the clock edge when we = 1. The read is registered: when
// re = 1, rd_data holds the addressed line after the edge, and a read and a write of the
// same words in the same clock return the old contents (read before write).
module tpose_sram #(
  parameter int W = 32,
  parameter int WORDS = 64
) (
  input  logic                clk,
  input  logic                we,
  input  logic                wr_col,
  input  logic [2:0]          wr_idx,
  input  logic signed [W-1:0] wr_data [8],
  input  logic                re,
  input  logic                rd_col,
  input  logic [2:0]          rd_idx,
  output logic signed [W-1:0] rd_data [8]
);

  logic signed [W-1:0] mem [WORDS];

  function automatic logic [5:0] line_addr(input logic col, input logic [2:0] idx,
                                           input logic [2:0] k);
    return col ? {k, idx} : {idx, k};
  endfunction

  always_ff @(posedge clk) begin
    if (we) begin
      for (int k = 0; k < 8; k++) mem[line_addr(wr_col, wr_idx, 3'(k))] <= wr_data[k];
    end
    if (re) begin
      for (int k = 0; k < 8; k++) rd_data[k] <= mem[line_addr(rd_col, rd_idx, 3'(k))];
    end
  end

endmodule
