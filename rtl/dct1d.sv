// dct1d: 8-point 1-D DCT processor built from five CORDIC rotators and 18 adders.
//
// Computes the unnormalised 8-point DCT, Y(m) = sum_n sqrt(2)*K_m*cos((2n+1)m*pi/16)*x(n)
// (sqrt(8) times the orthonormal DCT), for one 8-sample vector per clock.
// Even half: s_k = x(k)+x(7-k); Y(0) = (s0+s3)+(s1+s2), Y(4) = (s0+s3)-(s1+s2), and one
// rotator by 6pi/16 turns (s0-s3, s1-s2) into (Y(6), Y(2)).
// Odd half: d0 = x0-x7, d1 = x6-x1, d2 = x2-x5, d3 = x4-x3. Two rotators by pi/16 and two by
// 5pi/16 give
//   U = R1(d0,d3), V = R5(d2,d1), P = R5(d0,d3), Q = R1(d2,d1), and
//   Y(1) = U.x+V.x, Y(7) = U.y+V.y, Y(3) = P.y-Q.x, Y(5) = P.x+Q.y,
// where R(theta)(x,y) = sqrt(2)*(c*x - s*y, s*x + c*y) is what cordic_rot computes.
// The five-rotator / 18-adder structure, the angles pi/16 and 5pi/16 of the four odd
// rotators, the parallel 8-in/8-out rate and the 8-clock latency follow the document;
// the angle 6pi/16 of the even rotator, the exact pairing of inputs into the odd rotators
// and the split of the 8 clocks are this design's derivation from the transform matrix.
//
// Pipeline (one vector per clock, latency 8):
//   clock 1: input butterfly (8 adders)          clock 2: even butterfly (4 adders)
//   clocks 3-7: CORDIC rotators (+2 adders for Y0/Y4 in clock 3)
//   clock 8: odd output adders (4 adders), output register.
// Ports: x_in[n] is x(n); y_out[m] is Y(m) in natural order; valid travels with the data.
module dct1d
  import dct_pkg::*;
#(
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  coef_set_t           coef,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_in  [8],
  output logic                out_valid,
  output logic signed [W-1:0] y_out [8]
);

  localparam int CST = CORDIC_STAGES;  // pipeline depth of the rotators

  // ---- clock 1: input butterfly
  logic signed [W-1:0] s_q [4];
  logic signed [W-1:0] d_q [4];
  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) s_q[k] <= x_in[k] + x_in[7-k];
    d_q[0] <= x_in[0] - x_in[7];
    d_q[1] <= x_in[6] - x_in[1];
    d_q[2] <= x_in[2] - x_in[5];
    d_q[3] <= x_in[4] - x_in[3];
  end

  // ---- clock 2: even butterfly, odd differences delayed
  logic signed [W-1:0] e0_q, e1_q, p_q, q_q;
  logic signed [W-1:0] d2_q [4];
  always_ff @(posedge clk) begin
    e0_q <= s_q[0] + s_q[3];
    e1_q <= s_q[1] + s_q[2];
    p_q  <= s_q[0] - s_q[3];
    q_q  <= s_q[1] - s_q[2];
    d2_q <= d_q;
  end

  // ---- clocks 3..7: five rotators; Y0/Y4 formed in clock 3 and delayed alongside
  logic signed [W-1:0] y6_r, y2_r, ux, uy, vx, vy, px, py, qx, qy;

  cordic_rot #(.W(W), .ITER(CORDIC_ITER), .STAGES(CST)) u_c1 (
    .clk, .sigma(coef.r6.sigma), .comp(coef.r6.comp),
    .x_in(p_q), .y_in(q_q), .x_out(y6_r), .y_out(y2_r));
  cordic_rot #(.W(W), .ITER(CORDIC_ITER), .STAGES(CST)) u_c2 (
    .clk, .sigma(coef.r1.sigma), .comp(coef.r1.comp),
    .x_in(d2_q[0]), .y_in(d2_q[3]), .x_out(ux), .y_out(uy));
  cordic_rot #(.W(W), .ITER(CORDIC_ITER), .STAGES(CST)) u_c3 (
    .clk, .sigma(coef.r5.sigma), .comp(coef.r5.comp),
    .x_in(d2_q[2]), .y_in(d2_q[1]), .x_out(vx), .y_out(vy));
  cordic_rot #(.W(W), .ITER(CORDIC_ITER), .STAGES(CST)) u_c4 (
    .clk, .sigma(coef.r5.sigma), .comp(coef.r5.comp),
    .x_in(d2_q[0]), .y_in(d2_q[3]), .x_out(px), .y_out(py));
  cordic_rot #(.W(W), .ITER(CORDIC_ITER), .STAGES(CST)) u_c5 (
    .clk, .sigma(coef.r1.sigma), .comp(coef.r1.comp),
    .x_in(d2_q[2]), .y_in(d2_q[1]), .x_out(qx), .y_out(qy));

  logic signed [W-1:0] y0_d [CST];
  logic signed [W-1:0] y4_d [CST];
  always_ff @(posedge clk) begin
    y0_d[0] <= e0_q + e1_q;
    y4_d[0] <= e0_q - e1_q;
    for (int k = 1; k < CST; k++) begin
      y0_d[k] <= y0_d[k-1];
      y4_d[k] <= y4_d[k-1];
    end
  end

  // ---- clock 8: odd output adders
  always_ff @(posedge clk) begin
    y_out[0] <= y0_d[CST-1];
    y_out[4] <= y4_d[CST-1];
    y_out[2] <= y2_r;
    y_out[6] <= y6_r;
    y_out[1] <= ux + vx;
    y_out[7] <= uy + vy;
    y_out[3] <= py - qx;
    y_out[5] <= px + qy;
  end

  // ---- valid pipeline
  logic [7:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[6:0], in_valid};
  end
  assign out_valid = vld[7];

endmodule
