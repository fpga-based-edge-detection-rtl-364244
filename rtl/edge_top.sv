// edge_top: first stage of a subpixel edge detector. For every pixel of a
// raster image it computes the gradient (dx, dy), the second derivative of
// the image along the gradient direction R, and the gradient magnitude
// floor(sqrt(dx^2 + dy^2)), and it accumulates a histogram of that magnitude
// (from which the edge-following software picks an adaptive threshold).
//
// Structure:
//   pixel -> neighbourhood -> sobel X -> dx -> neighbourhood -> sobel X -> dxx
//                                                            -> sobel Y -> dxy
//                          -> sobel Y -> dy -> neighbourhood -> sobel Y -> dyy
//   dx, dy (window centres, delayed 4 to meet dxx/dxy/dyy), dxx, dxy, dyy
//          -> derivator -> R
//                       -> dx^2+dy^2 -> sqrt_lut -> delay 19 -> gradient
//                                                            -> histogram
//   output mux: input pixel, dx, dy or R, chosen per frame by mode.
// All pipeline registers advance on the pipe_ctrl step enable, one pixel per
// clock while pixels are offered, and pipe_ctrl flushes 2*HRES+44 steps after
// each frame of HRES*VRES pixels. Windows at the image border wrap onto the
// adjacent line (and the first frame's first lines see the line memories'
// power-up contents), as the document does not treat borders.
//
// Timing: each output stream delivers HRES*VRES values per frame, in pixel
// order, flagged by pix_out_valid / gradient_valid. Latencies in steps from
// the pixel's own input step: pixel 0, dx and dy HRES+6, R 2*HRES+44,
// gradient 2*HRES+43. mode is sampled on a frame's first step. pix_out is
// signed, 20 bits; the pixel is zero-extended, dx and dy sign-extended.
//
// The chain of windows and Sobel units, the derivator, the square root and
// the four-input output multiplexer follow the document's top-level drawing;
// feeding the histogram from the square root output, the alignment of the
// multiplexer inputs, the frame size (VRES) and the control unit are this
// design's choices.
module edge_top
  import edge_pkg::*;
#(
  parameter int unsigned HRES  = 1024,
  parameter int unsigned VRES  = 256,
  parameter int unsigned PIX_W = 8,
  localparam int unsigned QW     = 19,
  localparam int unsigned FRAME  = HRES * VRES,
  localparam int unsigned CNT_W  = $clog2(FRAME + 1),
  localparam int unsigned GSQ_W  = 2 * PIX_W,
  localparam int unsigned G_W    = PIX_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // pixel input
  input  logic [PIX_W-1:0]     pix_in,
  input  logic                 pix_in_valid,
  output logic                 pix_in_ready,
  input  logic [1:0]           mode,
  // outputs
  output logic signed [QW:0]   pix_out,
  output logic                 pix_out_valid,
  output logic [G_W-1:0]       gradient,
  output logic                 gradient_valid,
  output logic                 frame_done,
  // histogram host ports
  input  logic [G_W-1:0]       hist_raddr,
  input  logic                 hist_ren,
  output logic [CNT_W-1:0]     hist_rdata,
  input  logic [G_W-1:0]       hist_waddr,
  input  logic [CNT_W-1:0]     hist_wdata,
  input  logic                 hist_wen,
  output logic                 hist_ready
);

  localparam int unsigned LAT_D    = centre_lat(HRES) + SOBEL_LAT + 1;      // dx at mux output
  localparam int unsigned LAT_DD   = 2 * (centre_lat(HRES) + SOBEL_LAT) + 1; // dxx at derivator input
  localparam int unsigned LAT_R    = LAT_DD + DERIV_LAT + 1;                  // R at mux output
  localparam int unsigned LAT_G    = LAT_R - 1;                               // gradient register
  localparam int unsigned GDLY     = DERIV_LAT - GSQR_LAT - SQRT_LAT;         // 19
  localparam int unsigned LAT_MAX  = LAT_R;
  localparam int unsigned CW       = $clog2(FRAME + LAT_MAX + 1);

  // ---- control ----------------------------------------------------------
  logic          ce, frame_start;
  logic [CW-1:0] lat_pix;
  out_sel_e      mode_q, mode_now;

  pipe_ctrl #(.FRAME(FRAME), .LAT_MAX(LAT_MAX)) u_ctrl (
    .clk, .rst_n,
    .in_valid   (pix_in_valid),
    .in_ready   (pix_in_ready),
    .ce,
    .lat0       (lat_pix),
    .lat1       (CW'(LAT_G)),
    .valid0     (pix_out_valid),
    .valid1     (gradient_valid),
    .frame_start,
    .frame_done,
    .flushing   ());

  assign mode_now = frame_start ? out_sel_e'(mode) : mode_q;

  always_ff @(posedge clk) begin
    if (!rst_n)           mode_q <= OUT_PIXEL;
    else if (frame_start) mode_q <= out_sel_e'(mode);
  end

  always_comb begin
    unique case (mode_q)
      OUT_PIXEL: lat_pix = '0;
      OUT_DX,
      OUT_DY:    lat_pix = CW'(LAT_D);
      default:   lat_pix = CW'(LAT_R);
    endcase
  end

  // pixels offered outside the input part of a frame are replaced by zero
  logic [PIX_W-1:0] pix;
  assign pix = pix_in_ready ? pix_in : '0;

  // ---- first derivatives ---------------------------------------------------
  logic [2:0][2:0][PIX_W-1:0] win_p, win_dx, win_dy;
  logic signed [PIX_W-1:0]    dx, dy, dxx, dxy, dyy, dx_c, dy_c;

  neighbourhood #(.HRES(HRES), .W(PIX_W)) u_nb_pix (
    .clk, .rst_n, .ce, .pix(pix), .win(win_p));

  sobel #(.AXIS(SOBEL_X), .W(PIX_W), .IN_SIGNED(1'b0)) u_sobel_x (
    .clk, .ce, .win(win_p), .result_x8(), .result(dx));
  sobel #(.AXIS(SOBEL_Y), .W(PIX_W), .IN_SIGNED(1'b0)) u_sobel_y (
    .clk, .ce, .win(win_p), .result_x8(), .result(dy));

  // ---- second derivatives --------------------------------------------------
  neighbourhood #(.HRES(HRES), .W(PIX_W)) u_nb_dx (
    .clk, .rst_n, .ce, .pix(dx), .win(win_dx));
  neighbourhood #(.HRES(HRES), .W(PIX_W)) u_nb_dy (
    .clk, .rst_n, .ce, .pix(dy), .win(win_dy));

  sobel #(.AXIS(SOBEL_X), .W(PIX_W), .IN_SIGNED(1'b1)) u_sobel_xx (
    .clk, .ce, .win(win_dx), .result_x8(), .result(dxx));
  sobel #(.AXIS(SOBEL_Y), .W(PIX_W), .IN_SIGNED(1'b1)) u_sobel_xy (
    .clk, .ce, .win(win_dx), .result_x8(), .result(dxy));
  sobel #(.AXIS(SOBEL_Y), .W(PIX_W), .IN_SIGNED(1'b1)) u_sobel_yy (
    .clk, .ce, .win(win_dy), .result_x8(), .result(dyy));

  // window centres wait for the second Sobel stage
  delay_line #(.N(SOBEL_LAT), .W(PIX_W)) u_dly_dx (
    .clk, .ce, .d(win_dx[1][1]), .q(dx_c));
  delay_line #(.N(SOBEL_LAT), .W(PIX_W)) u_dly_dy (
    .clk, .ce, .d(win_dy[1][1]), .q(dy_c));

  // ---- second directional derivative and gradient magnitude ---------------
  logic signed [QW:0]  r;
  logic [GSQ_W-1:0]    gsqr;
  logic [G_W-1:0]      grad_root;

  derivator #(.W(PIX_W), .QW(QW)) u_deriv (
    .clk, .ce, .dx(dx_c), .dy(dy_c), .dxx, .dxy, .dyy,
    .r, .gradient_sqr(gsqr));

  sqrt_lut u_sqrt (.clk, .ce, .x(16'(gsqr)), .r(grad_root));

  delay_line #(.N(GDLY), .W(G_W)) u_dly_g (
    .clk, .ce, .d(grad_root), .q(gradient));

  // ---- output multiplexer ---------------------------------------------------
  always_ff @(posedge clk) begin
    if (ce) begin
      unique case (mode_now)
        OUT_PIXEL: pix_out <= (QW+1)'({1'b0, pix});
        OUT_DX:    pix_out <= (QW+1)'(dx);
        OUT_DY:    pix_out <= (QW+1)'(dy);
        default:   pix_out <= r;
      endcase
    end
  end

  // ---- histogram of the gradient magnitude --------------------------------
  histogram #(.BIN_W(G_W), .CNT_W(CNT_W)) u_hist (
    .clk, .rst_n,
    .in_wen    (gradient_valid),
    .in_data   (gradient),
    .hist_raddr, .hist_ren, .hist_rdata,
    .hist_waddr, .hist_wdata, .hist_wen, .hist_ready,
    .fwd_hit   (),
    .byp_used  ());

endmodule
