// edge_pkg: types and latency constants shared by the edge-detection pipeline.
//
// The pipeline advances one pixel per enabled clock ("step"). Every latency
// below is counted in steps from the step that takes a pixel in to the step
// after which the result for that pixel (as window centre) sits in a register.
// They follow from the structure: a 3x3 window delays its centre by hres+1
// steps, a Sobel stage by 4, the derivator by 32 and the square root by 3.
package edge_pkg;

  // Which Sobel kernel a sobel instance applies.
  typedef enum logic {
    SOBEL_X = 1'b0,   // right column minus left column
    SOBEL_Y = 1'b1    // bottom row minus top row
  } sobel_axis_e;

  // Source selected by the output multiplexer.
  typedef enum logic [1:0] {
    OUT_PIXEL = 2'd0,  // input pixel, passed straight through
    OUT_DX    = 2'd1,  // first derivative along x
    OUT_DY    = 2'd2,  // first derivative along y
    OUT_R     = 2'd3   // second directional derivative along the gradient
  } out_sel_e;

  localparam int unsigned SOBEL_LAT = 4;
  localparam int unsigned DERIV_LAT = 32;
  localparam int unsigned GSQR_LAT  = 10;
  localparam int unsigned SQRT_LAT  = 3;

  // Steps from a window's newest pixel entering to its centre reaching A22.
  function automatic int unsigned centre_lat(int unsigned hres);
    return hres + 1;
  endfunction

endpackage
