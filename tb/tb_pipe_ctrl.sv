// tb_pipe_ctrl: a small frame (20 pixels, 7 flush steps) with a random
// offer pattern. Checks that in_ready is high for exactly the input steps,
// that ce follows in_valid while ready and is held high while flushing, that
// each stream gives FRAME valid pulses per frame at the step index its
// latency implies, and that frame_start/frame_done mark the frame bounds.
module tb_pipe_ctrl;
  localparam int unsigned FRAME = 20, LAT_MAX = 7, TOTAL = FRAME + LAT_MAX;
  localparam int unsigned CW = $clog2(TOTAL + 1);
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, ce, valid0, valid1, frame_start, frame_done, flushing;
  logic [CW-1:0] lat0 = CW'(3), lat1 = CW'(LAT_MAX);
  int checks = 0, failures = 0;
  int steps = 0, n0 = 0, n1 = 0, frames = 0, last_step = -1;

  pipe_ctrl #(.FRAME(FRAME), .LAT_MAX(LAT_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: step index within frame
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (in_ready != (steps < FRAME)) failures++;
    if (ce != ((steps < FRAME) ? in_valid : 1'b1)) failures++;
    if (frame_start != (ce && steps == 0)) failures++;
    // outputs refer to the previous step
    if (valid0 != (last_step >= 0 && last_step >= int'(lat0) && last_step < int'(lat0) + FRAME)) failures++;
    if (valid1 != (last_step >= 0 && last_step >= int'(lat1) && last_step < int'(lat1) + FRAME)) failures++;
    if (frame_done != (last_step == TOTAL - 1)) failures++;
    if (valid0) n0++;
    if (valid1) n1++;
    if (frame_done) begin
      frames++;
      checks++;
      if (n0 != FRAME || n1 != FRAME) failures++;
      n0 = 0; n1 = 0;
    end
    last_step = ce ? steps : -1;
    if (ce) steps = (steps == TOTAL - 1) ? 0 : steps + 1;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
    end
    checks++;
    if (frames < 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
