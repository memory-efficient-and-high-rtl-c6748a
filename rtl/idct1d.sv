// idct1d: 8-point 1-D IDCT processor built from five CORDIC rotators and 18 adders.
//
// Computes the unnormalised 8-point IDCT, x(n) = sum_m sqrt(2)*K_m*cos((2n+1)m*pi/16)*Y(m)
// (the transpose of dct1d), for one 8-coefficient vector per clock.
// Even half: g0 = Y0+Y4, g1 = Y0-Y4; rotator R1 (6pi/16) maps (Y2, Y6) to
//   (r2, r1) = (e*Y2 - b*Y6, b*Y2 + e*Y6); E0 = g0+r1, E3 = g0-r1, E1 = g1+r2, E2 = g1-r2.
// Odd half: rotators R0 (pi/16, two copies) and R2 (5pi/16, two copies),
//   A = R0(Y7,Y1), B = R2(Y3,Y5), C = R2(Y7,Y1), D = R0(Y3,Y5), then
//   O0 = A.y+B.y, O1 = C.x+D.y, O2 = C.y-D.x, O3 = A.x+B.x and
//   x0 = E0+O0, x7 = E0-O0, x1 = E1-O1, x6 = E1+O1, x2 = E2+O2, x5 = E2-O2,
//   x3 = E3-O3, x4 = E3+O3.
// A rotation by -theta is a rotation by +theta with x and y swapped at input and output,
// which is how the odd half of the IDCT reuses the rotator structure of the DCT.
// The rotator angles (R0 pi/16, R2 5pi/16, R1 6pi/16), the five rotators, the 18 adders,
// the 8-in/8-out rate and the 8-clock latency follow the document; the exact equations
// above are this design's derivation from the transform matrix.
//
// Pipeline (one vector per clock, latency 8):
//   clock 1: g0, g1 (2 adders)       clocks 2-6: rotators
//   clock 7: even and odd sums (8 adders)   clock 8: output butterfly (8 adders).
// Ports: y_in[m] is Y(m); x_out[n] is x(n) in natural order; valid travels with the data.
module idct1d
  import dct_pkg::*;
#(
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  coef_set_t           coef,
  input  logic                in_valid,
  input  logic signed [W-1:0] y_in  [8],
  output logic                out_valid,
  output logic signed [W-1:0] x_out [8]
);

  localparam int CST = CORDIC_STAGES;  // pipeline depth of the rotators

  // ---- clock 1
  logic signed [W-1:0] g0_q, g1_q, y2_q, y6_q, y1_q, y3_q, y5_q, y7_q;
  always_ff @(posedge clk) begin
    g0_q <= y_in[0] + y_in[4];
    g1_q <= y_in[0] - y_in[4];
    y2_q <= y_in[2];
    y6_q <= y_in[6];
    y1_q <= y_in[1];
    y3_q <= y_in[3];
    y5_q <= y_in[5];
    y7_q <= y_in[7];
  end

  // ---- clocks 2..6: rotators; g0/g1 delayed alongside
  logic signed [W-1:0] r2, r1, ax, ay, bx, by, cx, cy, dx, dy;

  cordic_rot #(.W(W), .ITER(CORDIC_ITER), .STAGES(CST)) u_r1  (.clk, .sigma(coef.r6.sigma), .comp(coef.r6.comp),
                             .x_in(y2_q), .y_in(y6_q), .x_out(r2), .y_out(r1));
  cordic_rot #(.W(W), .ITER(CORDIC_ITER), .STAGES(CST)) u_r0a (
    .clk, .sigma(coef.r1.sigma), .comp(coef.r1.comp),
    .x_in(y7_q), .y_in(y1_q), .x_out(ax), .y_out(ay));
  cordic_rot #(.W(W), .ITER(CORDIC_ITER), .STAGES(CST)) u_r2a (
    .clk, .sigma(coef.r5.sigma), .comp(coef.r5.comp),
    .x_in(y3_q), .y_in(y5_q), .x_out(bx), .y_out(by));
  cordic_rot #(.W(W), .ITER(CORDIC_ITER), .STAGES(CST)) u_r2b (
    .clk, .sigma(coef.r5.sigma), .comp(coef.r5.comp),
    .x_in(y7_q), .y_in(y1_q), .x_out(cx), .y_out(cy));
  cordic_rot #(.W(W), .ITER(CORDIC_ITER), .STAGES(CST)) u_r0b (
    .clk, .sigma(coef.r1.sigma), .comp(coef.r1.comp),
    .x_in(y3_q), .y_in(y5_q), .x_out(dx), .y_out(dy));

  logic signed [W-1:0] g0_d [CST];
  logic signed [W-1:0] g1_d [CST];
  always_ff @(posedge clk) begin
    g0_d[0] <= g0_q;
    g1_d[0] <= g1_q;
    for (int k = 1; k < CST; k++) begin
      g0_d[k] <= g0_d[k-1];
      g1_d[k] <= g1_d[k-1];
    end
  end

  // ---- clock 7: even and odd sums
  logic signed [W-1:0] ev_q [4];
  logic signed [W-1:0] od_q [4];
  always_ff @(posedge clk) begin
    ev_q[0] <= g0_d[CST-1] + r1;
    ev_q[3] <= g0_d[CST-1] - r1;
    ev_q[1] <= g1_d[CST-1] + r2;
    ev_q[2] <= g1_d[CST-1] - r2;
    od_q[0] <= ay + by;
    od_q[1] <= cx + dy;
    od_q[2] <= cy - dx;
    od_q[3] <= ax + bx;
  end

  // ---- clock 8: output butterfly
  always_ff @(posedge clk) begin
    x_out[0] <= ev_q[0] + od_q[0];
    x_out[7] <= ev_q[0] - od_q[0];
    x_out[1] <= ev_q[1] - od_q[1];
    x_out[6] <= ev_q[1] + od_q[1];
    x_out[2] <= ev_q[2] + od_q[2];
    x_out[5] <= ev_q[2] - od_q[2];
    x_out[3] <= ev_q[3] - od_q[3];
    x_out[4] <= ev_q[3] + od_q[3];
  end

  // ---- valid pipeline
  logic [7:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[6:0], in_valid};
  end
  assign out_valid = vld[7];

endmodule
