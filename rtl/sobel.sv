// sobel: Sobel derivative of a 3x3 window in four pipeline stages.
//
// AXIS = SOBEL_X computes (A13-A11) + 2*(A23-A21) + (A33-A31) (right column
// minus left column); AXIS = SOBEL_Y computes (A31-A11) + 2*(A32-A12) +
// (A33-A13) (bottom row minus top row). No multiplier is used: the factor 2 is
// a shift and the kernel's zero column or row is never touched.
//   stage 1  extend the six taps to W+3 bits (zero-extend unsigned pixels,
//            sign-extend signed derivatives) and double the middle pair
//   stage 2  three subtractions
//   stage 3  add the outer two differences, delay the middle one
//   stage 4  final sum
// result_x8 is the kernel sum (eight times the derivative); result is that sum
// divided by 8 with an arithmetic shift (rounds toward minus infinity), which
// fits in W signed bits for W-bit inputs. Latency: after the step that samples
// win, the result is ready 4 steps later.
//
// The stage split follows the document's figure; the input extension width
// and the rounding of the division by 8 are this design's choice.
module sobel
  import edge_pkg::*;
#(
  parameter sobel_axis_e AXIS      = SOBEL_X,
  parameter int unsigned W         = 8,
  parameter bit          IN_SIGNED = 1'b0
) (
  input  logic                    clk,
  input  logic                    ce,
  input  logic [2:0][2:0][W-1:0]  win,
  output logic signed [W+2:0]     result_x8,
  output logic signed [W-1:0]     result
);

  localparam int unsigned SW = W + 3;
  typedef logic signed [SW-1:0] s_t;

  function automatic s_t ext(logic [W-1:0] v);
    return IN_SIGNED ? s_t'(signed'(v)) : s_t'({1'b0, v});
  endfunction

  // taps: positive and negative side of each of the three kernel lines
  logic [W-1:0] p1, n1, p2, n2, p3, n3;
  always_comb begin
    if (AXIS == SOBEL_X) begin
      p1 = win[0][2]; n1 = win[0][0];
      p2 = win[1][2]; n2 = win[1][0];
      p3 = win[2][2]; n3 = win[2][0];
    end else begin
      p1 = win[2][0]; n1 = win[0][0];
      p2 = win[2][1]; n2 = win[0][1];
      p3 = win[2][2]; n3 = win[0][2];
    end
  end

  s_t e_p1, e_n1, e_p2, e_n2, e_p3, e_n3;  // stage 1
  s_t d1, d2, d3;                           // stage 2
  s_t s13, d2_q;                            // stage 3
  s_t sum;                                  // stage 4

  always_ff @(posedge clk) begin
    if (ce) begin
      e_p1 <= ext(p1);       e_n1 <= ext(n1);
      e_p2 <= ext(p2) <<< 1; e_n2 <= ext(n2) <<< 1;
      e_p3 <= ext(p3);       e_n3 <= ext(n3);
      d1   <= e_p1 - e_n1;
      d2   <= e_p2 - e_n2;
      d3   <= e_p3 - e_n3;
      s13  <= d1 + d3;
      d2_q <= d2;
      sum  <= s13 + d2_q;
    end
  end

  assign result_x8 = sum;
  assign result    = W'(sum >>> 3);

endmodule
