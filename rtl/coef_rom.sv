// coef_rom: the 6-word coefficient ROM of one 2-D DCT/IDCT processor.
//
// The processor needs six coefficient words, which the control unit reads once after reset
// and hands to the CORDIC rotators of both 1-D processors. The ROM size (six words, next to
// the 64-word transpose bank) is the document's; what the words hold is this design's choice:
// for each of the three rotation angles pi/16, 5pi/16 and 6pi/16, the direction word of a
// 15-step rotation-mode CORDIC and the scale-compensation word.
//
// Direction words: start from z0 = theta, take sigma_i = sign(z_i) (bit i set when negative),
// z_{i+1} = z_i - sigma_i*atan(2^-i), for i = 0..14. The residual angle is below 3e-5 rad.
// Compensation word: the canonical signed-digit form of round(2^15 * sqrt(2)/K) with
// K = prod_{i=0}^{14} sqrt(1 + 2^-2i) = 1.64676, i.e. sqrt(2)/K = 0.858795
// = 1 - 2^-3 - 2^-6 - 2^-11 - 2^-13 + 2^-15. It is the same for all three angles because
// every rotator runs the same number of micro-rotations.
//
// Interface: asynchronous read, rdata follows addr in the same cycle; addresses 6 and 7 read 0.
module coef_rom
  import dct_pkg::*;
(
  input  logic [2:0]  addr,
  output logic [31:0] rdata
);

  always_comb begin
    unique case (addr)
      ROM_SIG_R1:  rdata = 32'h0000_7216;
      ROM_COMP_R1: rdata = 32'h4cc0_30c1;
      ROM_SIG_R5:  rdata = 32'h0000_6e8c;
      ROM_COMP_R5: rdata = 32'h4cc0_30c1;
      ROM_SIG_R6:  rdata = 32'h0000_0b24;
      ROM_COMP_R6: rdata = 32'h4cc0_30c1;
      default:     rdata = 32'h0;
    endcase
  end

endmodule
