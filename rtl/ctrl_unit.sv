// ctrl_unit: control unit of the 2-D DCT/IDCT processor.
//
// Three jobs, all driven by one FSM and two line counters:
//  * LOAD: after reset it reads the six coefficient-ROM words, one per clock, into the
//    coefficient register that feeds every CORDIC rotator; in_ready stays low until done.
//  * Write side: each valid line from the input processor P1 is written to the transpose
//    bank at line wr_idx in orientation wr_col; after the eighth line of a block the block
//    is complete and the orientation flips, so blocks alternate between rows and columns.
//  * Read side (state READ): the clock after a block is complete, the output processor P2
//    reads its eight lines, one per clock, in the other orientation than they were written.
//    P2 therefore reads line j of block n no later than P1 writes line j of block n+1, so
//    the single bank never needs a stall; the next block can complete at the earliest in
//    the clock of the last read, and reading then continues with it without a gap.
// The FSM itself, the alternation of rows and columns and the coefficient ROM are named
// by the document; the states, the coefficient load and the timing are this design's.
//
// Interface: p1_valid is P1's output valid; we/wr_col/wr_idx and re/rd_col/rd_idx drive
// tpose_sram; rom_addr/rom_data connect to coef_rom; coef goes to both 1-D processors.
module ctrl_unit
  import dct_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output logic [2:0]  rom_addr,
  input  logic [31:0] rom_data,
  output coef_set_t   coef,
  output logic        in_ready,
  input  logic        p1_valid,
  output logic        we,
  output logic        wr_col,
  output logic [2:0]  wr_idx,
  output logic        re,
  output logic        rd_col,
  output logic [2:0]  rd_idx
);

  typedef enum logic [1:0] {S_LOAD, S_IDLE, S_READ} state_e;
  state_e state;
  logic [2:0] load_cnt;
  logic block_done;  // the eighth line of a block is written in this clock

  assign rom_addr = load_cnt;
  assign in_ready = (state != S_LOAD);
  assign we = p1_valid && (state != S_LOAD);
  assign block_done = we && (wr_idx == 3'd7);
  assign re = (state == S_READ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_LOAD;
      load_cnt <= '0;
      coef     <= '0;
      wr_idx   <= '0;
      wr_col   <= 1'b0;
      rd_idx   <= '0;
      rd_col   <= 1'b0;
    end else begin
      unique case (state)
        S_LOAD: begin
          unique case (rom_addr_e'(load_cnt))
            ROM_SIG_R1:  coef.r1.sigma <= rom_data;
            ROM_COMP_R1: coef.r1.comp  <= rom_data;
            ROM_SIG_R5:  coef.r5.sigma <= rom_data;
            ROM_COMP_R5: coef.r5.comp  <= rom_data;
            ROM_SIG_R6:  coef.r6.sigma <= rom_data;
            ROM_COMP_R6: coef.r6.comp  <= rom_data;
            default: ;
          endcase
          load_cnt <= load_cnt + 3'd1;
          if (load_cnt == 3'(ROM_WORDS - 1)) state <= S_IDLE;
        end
        S_IDLE, S_READ: begin
          if (state == S_READ) begin
            rd_idx <= rd_idx + 3'd1;
            if (rd_idx == 3'd7) state <= S_IDLE;
          end
          if (block_done) begin
            // start reading the block just completed, in the other orientation
            state  <= S_READ;
            rd_idx <= '0;
            rd_col <= ~wr_col;
          end
        end
        default: state <= S_LOAD;
      endcase
      if (we) begin
        wr_idx <= wr_idx + 3'd1;
        if (block_done) wr_col <= ~wr_col;
      end
    end
  end

  // A block can complete only when no read is in progress or in the last read clock.
  assert property (@(posedge clk) disable iff (!rst_n)
                   block_done && state == S_READ |-> rd_idx == 3'd7);

endmodule
