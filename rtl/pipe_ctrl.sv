// pipe_ctrl: loads and flushes the pixel pipeline frame by frame.
//
// The whole datapath advances only on steps (ce high). A frame is FRAME input
// steps followed by LAT_MAX flush steps. During the input part a step happens
// whenever a pixel is offered (in_valid; in_ready is high); during the flush
// part in_ready is low and a step happens every clock, pushing the last
// pixels' results out. With a continuous input the pipeline therefore runs
// at one pixel per clock plus LAT_MAX clocks per frame.
//
// Each output stream of the datapath is a register whose value, after step s,
// belongs to pixel s - L for that stream's latency L. For two streams with
// run-time latencies lat0 and lat1 (each at most LAT_MAX) valid0/valid1 pulse
// in the clock after a step whose result belongs to pixel 0..FRAME-1 of the
// frame, so each stream gives exactly FRAME valid outputs per frame, in pixel
// order. frame_start marks the step taking a frame's first pixel and
// frame_done pulses after the last flush step. Reset is synchronous, active
// low.
//
// The document only says a control unit loads and flushes the pipeline; how
// it does so is this design's own.
module pipe_ctrl #(
  parameter int unsigned FRAME   = 262144,
  parameter int unsigned LAT_MAX = 2092,
  localparam int unsigned TOTAL  = FRAME + LAT_MAX,
  localparam int unsigned CW     = $clog2(TOTAL + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          ce,
  input  logic [CW-1:0] lat0,
  input  logic [CW-1:0] lat1,
  output logic          valid0,
  output logic          valid1,
  output logic          frame_start,
  output logic          frame_done,
  output logic          flushing
);

  logic [CW-1:0] step;       // index of the next step within the frame
  logic [CW-1:0] done_idx;   // index of the step just taken
  logic          step_done;

  assign in_ready    = (step < CW'(FRAME));
  assign flushing    = !in_ready;
  assign ce          = in_ready ? in_valid : 1'b1;
  assign frame_start = ce && (step == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step      <= '0;
      step_done <= 1'b0;
      done_idx  <= '0;
    end else begin
      step_done <= ce;
      if (ce) begin
        done_idx <= step;
        step     <= (step == CW'(TOTAL - 1)) ? '0 : step + 1'b1;
      end
    end
  end

  assign valid0     = step_done && (done_idx >= lat0) && (done_idx < lat0 + CW'(FRAME));
  assign valid1     = step_done && (done_idx >= lat1) && (done_idx < lat1 + CW'(FRAME));
  assign frame_done = step_done && (done_idx == CW'(TOTAL - 1));

  a_lat_in_range : assert property (@(posedge clk) disable iff (!rst_n)
    (lat0 <= CW'(LAT_MAX)) && (lat1 <= CW'(LAT_MAX)));

endmodule
