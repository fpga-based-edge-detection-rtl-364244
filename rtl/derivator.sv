// derivator: second directional derivative along the gradient.
//
// Computes, one pixel per step,
//     R = (dxx*dx^2 + 2*dxy*dx*dy + dyy*dy^2) / (dx^2 + dy^2)
// from five signed W-bit derivatives. The multipliers and the divider work on
// unsigned magnitudes, so the pipeline converts between two's complement and
// sign-magnitude around them. Stages and their depth in steps:
//   1 (1)   two's complement -> sign-magnitude for dx, dy, dxx, dxy, dyy
//   2 (3)   A = |dx|^2, B = |dy|^2, C = |dx||dy|   (pipe_mult 8x8, log2 8)
//   3 (4)   D = A|dxx|, E = B|dyy|, F = C|dxy|      (pipe_mult 8x16, log2 16)
//   4 (1)   sign-magnitude -> two's complement for D, E, F
//   5 (1)   M = D + E, N = 2F, Q = A + B
//   6 (1)   P = M + N
//   7 (1)   P -> sign-magnitude
//   8 (QW)  |P| / Q in the array divider
//   9 (1)   sign-magnitude -> two's complement
// The total latency is 13 + QW steps (32 for QW = 19): r is ready that many
// steps after the inputs are sampled. gradient_sqr = dx^2 + dy^2 is tapped
// after stage 5 and is ready 10 steps after the inputs. Because
// |P| <= 2^(W+1) * Q, the quotient never exceeds 2^(W+1) and QW = 19 bits
// hold it with room to spare. The division truncates toward zero.
//
// Stage contents and depths follow the document. Returning R = 0 when
// dx = dy = 0 (the divisor is zero and the quotient meaningless) is this
// design's choice.
module derivator #(
  parameter int unsigned W  = 8,
  parameter int unsigned QW = 19
) (
  input  logic                  clk,
  input  logic                  ce,
  input  logic signed [W-1:0]   dx,
  input  logic signed [W-1:0]   dy,
  input  logic signed [W-1:0]   dxx,
  input  logic signed [W-1:0]   dxy,
  input  logic signed [W-1:0]   dyy,
  output logic signed [QW:0]    r,
  output logic [2*W-1:0]        gradient_sqr
);

  localparam int unsigned L1 = $clog2(W);      // stage 2 depth
  localparam int unsigned L2 = $clog2(2 * W);  // stage 3 depth
  localparam int unsigned PW = 3 * W;          // |D|, |E|, |F|
  localparam int unsigned SW = PW + 3;         // signed sums M, N, P

  typedef logic [W-1:0] mag_t;

  function automatic mag_t mag(logic signed [W-1:0] v);
    return v[W-1] ? mag_t'(-v) : mag_t'(v);
  endfunction

  // ---- stage 1: to sign-magnitude -------------------------------------
  logic s1_sx, s1_sy, s1_sxx, s1_sxy, s1_syy;
  mag_t s1_mx, s1_my, s1_mxx, s1_mxy, s1_myy;
  always_ff @(posedge clk) begin
    if (ce) begin
      s1_sx  <= dx[W-1];  s1_mx  <= mag(dx);
      s1_sy  <= dy[W-1];  s1_my  <= mag(dy);
      s1_sxx <= dxx[W-1]; s1_mxx <= mag(dxx);
      s1_sxy <= dxy[W-1]; s1_mxy <= mag(dxy);
      s1_syy <= dyy[W-1]; s1_myy <= mag(dyy);
    end
  end

  // ---- stage 2: first products ----------------------------------------
  logic [2*W-1:0] s2_a, s2_b, s2_c;
  pipe_mult #(.WIDTH_A(W), .WIDTH_B(W)) u_mul_a (.clk, .ce, .a(s1_mx), .b(s1_mx), .p(s2_a));
  pipe_mult #(.WIDTH_A(W), .WIDTH_B(W)) u_mul_b (.clk, .ce, .a(s1_my), .b(s1_my), .p(s2_b));
  pipe_mult #(.WIDTH_A(W), .WIDTH_B(W)) u_mul_c (.clk, .ce, .a(s1_mx), .b(s1_my), .p(s2_c));

  // second derivatives and the sign of C wait for the products
  logic [3*(W+1):0] s2_dly;
  delay_line #(.N(L1), .W(3*(W+1)+1)) u_dly2 (
    .clk, .ce,
    .d({s1_sx ^ s1_sy, s1_sxx, s1_mxx, s1_sxy, s1_mxy, s1_syy, s1_myy}),
    .q(s2_dly));
  logic s2_sc, s2_sxx, s2_sxy, s2_syy;
  mag_t s2_mxx, s2_mxy, s2_myy;
  assign {s2_sc, s2_sxx, s2_mxx, s2_sxy, s2_mxy, s2_syy, s2_myy} = s2_dly;

  // ---- stage 3: second products ---------------------------------------
  logic [PW-1:0] s3_d, s3_e, s3_f;
  pipe_mult #(.WIDTH_A(W), .WIDTH_B(2*W)) u_mul_d (.clk, .ce, .a(s2_mxx), .b(s2_a), .p(s3_d));
  pipe_mult #(.WIDTH_A(W), .WIDTH_B(2*W)) u_mul_e (.clk, .ce, .a(s2_myy), .b(s2_b), .p(s3_e));
  pipe_mult #(.WIDTH_A(W), .WIDTH_B(2*W)) u_mul_f (.clk, .ce, .a(s2_mxy), .b(s2_c), .p(s3_f));

  logic [4*W+2:0] s3_dly;
  delay_line #(.N(L2), .W(4*W+3)) u_dly3 (
    .clk, .ce,
    .d({s2_sxx, s2_syy, s2_sc ^ s2_sxy, s2_a, s2_b}),
    .q(s3_dly));
  logic s3_sd, s3_se, s3_sf;
  logic [2*W-1:0] s3_a, s3_b;
  assign {s3_sd, s3_se, s3_sf, s3_a, s3_b} = s3_dly;

  // ---- stage 4: back to two's complement ------------------------------
  typedef logic signed [SW-1:0] sum_t;
  function automatic sum_t to2c(logic s, logic [PW-1:0] m);
    return s ? -sum_t'(m) : sum_t'(m);
  endfunction

  sum_t s4_d, s4_e, s4_f;
  logic [2*W-1:0] s4_a, s4_b;
  always_ff @(posedge clk) begin
    if (ce) begin
      s4_d <= to2c(s3_sd, s3_d);
      s4_e <= to2c(s3_se, s3_e);
      s4_f <= to2c(s3_sf, s3_f);
      s4_a <= s3_a;
      s4_b <= s3_b;
    end
  end

  // ---- stage 5: M = D + E, N = F << 1, Q = A + B ----------------------
  sum_t s5_m, s5_n;
  logic [2*W-1:0] s5_q;
  always_ff @(posedge clk) begin
    if (ce) begin
      s5_m <= s4_d + s4_e;
      s5_n <= s4_f <<< 1;
      s5_q <= s4_a + s4_b;   // at most 2*2^(2W-2), fits 2W bits
    end
  end
  assign gradient_sqr = s5_q;

  // ---- stage 6: P = M + N ---------------------------------------------
  sum_t s6_p;
  logic [2*W-1:0] s6_q;
  always_ff @(posedge clk) begin
    if (ce) begin
      s6_p <= s5_m + s5_n;
      s6_q <= s5_q;
    end
  end

  // ---- stage 7: P to sign-magnitude -----------------------------------
  logic s7_sp, s7_qz;
  logic [SW-1:0] s7_mp;
  logic [2*W-1:0] s7_q;
  always_ff @(posedge clk) begin
    if (ce) begin
      s7_sp <= s6_p[SW-1];
      s7_mp <= s6_p[SW-1] ? SW'(-s6_p) : SW'(s6_p);
      s7_q  <= s6_q;
      s7_qz <= (s6_q == '0);
    end
  end

  // ---- stage 8: divide --------------------------------------------------
  logic [QW-1:0] s8_quo;
  pipe_div #(.QW(QW), .AW(SW), .BW(2*W)) u_div (
    .clk, .ce, .a(s7_mp), .b(s7_q), .q(s8_quo));

  logic [1:0] s8_flags;
  delay_line #(.N(QW), .W(2)) u_dly8 (.clk, .ce, .d({s7_sp, s7_qz}), .q(s8_flags));

  // ---- stage 9: to two's complement -----------------------------------
  always_ff @(posedge clk) begin
    if (ce) begin
      if (s8_flags[0])      r <= '0;
      else if (s8_flags[1]) r <= -signed'({1'b0, s8_quo});
      else                  r <= signed'({1'b0, s8_quo});
    end
  end

endmodule
