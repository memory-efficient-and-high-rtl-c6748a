// dct_pkg: types and constants shared by the CORDIC-based 8x8 DCT/IDCT processors.
//
// Number format: every sample on every port is a two's-complement word of DATA_W bits
// with FRAC fractional bits (so an 8-bit pixel p enters as p << FRAC). The 32-bit word
// width follows the design's 32-bit fixed-point datapath; the split into 19 integer and
// 12 fractional bits is this design's own choice.
//
// The 1-D processors compute an unnormalised transform (the 1/sqrt(8) factor of the
// transform matrix is left out), so one 1-D pass scales by sqrt(8) and the 2-D result
// by 8; the 2-D processor removes that with a 3-bit arithmetic shift at its output.
//
// Each CORDIC rotator needs two 32-bit words: the micro-rotation direction word (bit i
// set means sigma_i = -1) and the scale-compensation word (16 signed digits of two bits,
// digit j weighting 2^-j: 2'b01 = +1, 2'b11 = -1, 2'b00 = 0). Three rotation angles are
// used, so the coefficient ROM holds six words.
package dct_pkg;

  localparam int DATA_W = 32;       // datapath word width
  localparam int FRAC = 12;         // fractional bits of the port format
  localparam int CORDIC_ITER = 15;  // micro-rotations per CORDIC rotator
  localparam int CORDIC_STAGES = 5; // pipeline registers per CORDIC rotator; the 1-D
                                    // processors' 8-clock latency assumes 5
  localparam int ROM_WORDS = 6;     // coefficient ROM depth

  // Coefficient words of one rotation angle.
  typedef struct packed {
    logic [31:0] sigma;  // micro-rotation directions
    logic [31:0] comp;   // scale-compensation digits
  } rot_coef_t;

  // The three angles used by both the DCT and the IDCT 1-D processors.
  typedef struct packed {
    rot_coef_t r6;  // 6*pi/16
    rot_coef_t r5;  // 5*pi/16
    rot_coef_t r1;  //   pi/16
  } coef_set_t;

  // ROM word addresses.
  typedef enum logic [2:0] {
    ROM_SIG_R1  = 3'd0,
    ROM_COMP_R1 = 3'd1,
    ROM_SIG_R5  = 3'd2,
    ROM_COMP_R5 = 3'd3,
    ROM_SIG_R6  = 3'd4,
    ROM_COMP_R6 = 3'd5
  } rom_addr_e;

endpackage
