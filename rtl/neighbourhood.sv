// neighbourhood: forms the 3x3 window of a raster pixel stream.
//
// Pixels of a line HRES wide arrive one per step (ce high). Each image row of
// the window is three registers (A?3 newest, A?1 oldest); between the rows a
// shift_mem of depth HRES-3 completes a delay of exactly one line, so the
// register chain spans 2*HRES+3 pixels. After the step that takes pixel n,
// win[r][c] (A(r+1)(c+1)) holds pixel n - (2-r)*HRES - (2-c), and the centre
// A22 holds pixel n-HRES-1. Line ends are not treated specially: the window of
// a pixel at the left or right border wraps onto the neighbouring line, and
// the first two lines see whatever preceded them in the stream.
//
// Structure and depths follow the document; the reset, which only sets the
// shift memories' address counters, is this design's.
module neighbourhood #(
  parameter int unsigned HRES = 1024,
  parameter int unsigned W    = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ce,
  input  logic [W-1:0]           pix,
  output logic [2:0][2:0][W-1:0] win   // win[row][col], row 0 = oldest line
);

  logic [W-1:0] mem_q [2];   // outputs of the two line memories

  always_ff @(posedge clk) begin
    if (ce) begin
      // bottom row (newest line)
      win[2][2] <= pix;
      win[2][1] <= win[2][2];
      win[2][0] <= win[2][1];
      // middle row
      win[1][2] <= mem_q[1];
      win[1][1] <= win[1][2];
      win[1][0] <= win[1][1];
      // top row
      win[0][2] <= mem_q[0];
      win[0][1] <= win[0][2];
      win[0][0] <= win[0][1];
    end
  end

  shift_mem #(.DEPTH(HRES - 3), .W(W)) u_line1 (
    .clk(clk), .rst_n(rst_n), .we(ce), .d(win[2][0]), .q(mem_q[1]));

  shift_mem #(.DEPTH(HRES - 3), .W(W)) u_line0 (
    .clk(clk), .rst_n(rst_n), .we(ce), .d(win[1][0]), .q(mem_q[0]));

endmodule
