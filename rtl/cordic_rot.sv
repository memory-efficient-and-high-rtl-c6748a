// cordic_rot: pipelined fixed-angle CORDIC rotator with built-in scale compensation.
//
// Computes, for a vector (x, y) and the angle theta encoded in `sigma`,
//   x_out = sqrt(2) * (cos(theta)*x - sin(theta)*y)
//   y_out = sqrt(2) * (sin(theta)*x + cos(theta)*y)
// The sqrt(2) makes the two outputs the DCT coefficients a..f of the transform matrix
// (a = sqrt(2)cos(pi/16), f = sqrt(2)sin(pi/16), and so on), so no multiplier is needed.
//
// How it works: ITER micro-rotations of the circular CORDIC in rotation mode,
//   x_{i+1} = x_i - sigma_i*2^-i*y_i,   y_{i+1} = y_i + sigma_i*2^-i*x_i,
// with the directions sigma_i precomputed for the fixed angle (the z recursion is done once,
// offline, and stored as one word in the coefficient ROM), so each micro-rotation is two
// shift-and-add/subtract units. The CORDIC gain K is then replaced by sqrt(2) through a
// shift-add multiplication by the signed-digit constant `comp` (= sqrt(2)/K).
// The micro-rotation recursion follows the document; the precomputed directions, the
// number of micro-rotations and the shift-add compensation are this design's choices.
// Angles up to 6pi/16 are used, inside the plain CORDIC convergence range (about 99.9
// degrees), so the expanded iteration sequence is not needed.
//
// Timing: STAGES pipeline registers, ceil(ITER/STAGES) micro-rotations before each;
// the compensation sits in front of the last register. A new vector every clock; results
// appear STAGES clocks later. Shifts truncate (arithmetic right shift).
module cordic_rot #(
  parameter int W = 32,
  parameter int ITER = 15,
  parameter int STAGES = 5,
  parameter int CDIG = 16   // compensation digits held in `comp`, weights 2^0 .. 2^-(CDIG-1)
) (
  input  logic                clk,
  input  logic [31:0]         sigma,
  input  logic [2*CDIG-1:0]   comp,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out
);

  localparam int PER = (ITER + STAGES - 1) / STAGES;

  logic signed [W-1:0] xs [STAGES+1];
  logic signed [W-1:0] ys [STAGES+1];

  assign xs[0] = x_in;
  assign ys[0] = y_in;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic signed [W-1:0] xc, yc, xn, yn;

    always_comb begin
      xc = xs[s];
      yc = ys[s];
      for (int k = 0; k < PER; k++) begin
        if (s * PER + k < ITER) begin
          if (sigma[s*PER+k]) begin
            xn = xc + (yc >>> (s * PER + k));
            yn = yc - (xc >>> (s * PER + k));
          end else begin
            xn = xc - (yc >>> (s * PER + k));
            yn = yc + (xc >>> (s * PER + k));
          end
          xc = xn;
          yc = yn;
        end else begin
          xn = xc;
          yn = yc;
        end
      end
      if (s == STAGES - 1) begin
        // gain compensation: multiply by the signed-digit constant in `comp`
        xn = '0;
        yn = '0;
        for (int j = 0; j < CDIG; j++) begin
          unique case (comp[2*j+:2])
            2'b01: begin xn = xn + (xc >>> j); yn = yn + (yc >>> j); end
            2'b11: begin xn = xn - (xc >>> j); yn = yn - (yc >>> j); end
            default: ;
          endcase
        end
      end else begin
        xn = xc;
        yn = yc;
      end
    end

    always_ff @(posedge clk) begin
      xs[s+1] <= xn;
      ys[s+1] <= yn;
    end
  end

  assign x_out = xs[STAGES];
  assign y_out = ys[STAGES];

endmodule
