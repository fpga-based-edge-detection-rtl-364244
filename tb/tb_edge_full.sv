// tb_edge_full: edge_top at its default size (1024 x 256 pixels per frame)
// through two complete frames: a first frame in dx mode with random gaps in
// the pixel offer, then an R frame offered back to back, whose latency
// (2*HRES+44 steps), frame time (one pixel per clock plus the flush) and
// gradient histogram are checked. Every valid output is compared with the
// stream model (tb_edge_model); the mechanisms are counted as in tb_edge_top.
module tb_edge_full;
  import tb_edge_model::*;
  localparam int HRES = 1024, VRES = 256;
  localparam int NF = 2;
  localparam int MODES [NF] = '{1, 3};
  localparam bit GAPS = 1'b1;
  localparam int FRAME = HRES * VRES, LAT_MAX = 2 * HRES + 44, TOTAL = FRAME + LAT_MAX;
  localparam int CNT_W = $clog2(FRAME + 1);
  localparam longint WATCHDOG = 64'd2000000;

  logic clk = 0, rst_n = 0;
  logic [7:0] pix_in = 0;
  logic pix_in_valid = 0, pix_in_ready;
  logic [1:0] mode = 0;
  logic signed [19:0] pix_out;
  logic pix_out_valid, gradient_valid, frame_done, hist_ready;
  logic [7:0] gradient, hist_raddr = 0, hist_waddr = 0;
  logic hist_ren = 0, hist_wen = 0;
  logic [CNT_W-1:0] hist_rdata, hist_wdata = 0;

  edge_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_flush = 0, n_fwd = 0, n_byp = 0, n_zdiv = 0, n_hread = 0, n_hclear = 0;
  int n_mode [4] = '{0, 0, 0, 0};

  int S[], dxm[], dym[], rm[], gm[];
  bit dok[], rok[];

  int cur_frame = 0, out_k = 0, grad_k = 0;
  longint t_start = -1, t_first_out = -1, t_done = 0;

  function automatic int pixel_of(int f, int k);
    int y = k / HRES, x = k % HRES;
    case ((y / 3 + x / 8 + f) % 4)
      0: return 100;
      1: return int'($urandom % 256);
      2: return (x % 8 < 4) ? 30 : 220;
      default: return (x * 16 + y * 8) % 256;
    endcase
  endfunction

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (pix_in_ready && !pix_in_valid && cur_frame < NF && t_start >= 0) n_stall++;
      if (!pix_in_ready) n_flush++;
      if (dut.u_hist.fwd_hit) n_fwd++;
      if (dut.u_hist.byp_used) n_byp++;
    end
  end

  // output monitor
  always @(posedge clk) if (rst_n && cur_frame < NF) begin
    automatic int base = cur_frame * TOTAL;
    if (pix_out_valid) begin
      automatic int c = base + out_k;
      automatic int exp_v = 0;
      automatic bit chk = 1;
      if (t_first_out < 0) t_first_out = longint'($time);
      case (MODES[cur_frame])
        0: exp_v = S[c];
        1: begin exp_v = dxm[c]; chk = dok[c]; end
        2: begin exp_v = dym[c]; chk = dok[c]; end
        default: begin
          exp_v = rm[c]; chk = rok[c];
          if (chk && dxm[c] == 0 && dym[c] == 0) n_zdiv++;
        end
      endcase
      if (chk) begin
        checks++;
        if (int'(pix_out) != exp_v) begin
          failures++;
          if (failures < 20) $display("frame %0d mode %0d k=%0d got %0d exp %0d", cur_frame, MODES[cur_frame], out_k, pix_out, exp_v);
        end
      end
      out_k++;
    end
    if (gradient_valid) begin
      automatic int c = base + grad_k;
      if (dok[c]) begin
        checks++;
        if (int'(gradient) != gm[c]) begin
          failures++;
          if (failures < 20) $display("frame %0d k=%0d gradient %0d exp %0d", cur_frame, grad_k, gradient, gm[c]);
        end
      end
      grad_k++;
    end
  end

  task automatic clear_hist();
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      hist_wen = 1; hist_waddr = 8'(i); hist_wdata = '0;
    end
    @(negedge clk); hist_wen = 0;
    n_hclear++;
  endtask

  task automatic check_hist(int f);
    int cnt [256];
    foreach (cnt[i]) cnt[i] = 0;
    for (int k = 0; k < FRAME; k++) cnt[gm[f * TOTAL + k]]++;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); hist_ren = 1; hist_raddr = 8'(i);
      @(negedge clk); hist_ren = 0;
      checks++;
      n_hread++;
      if (int'(hist_rdata) != cnt[i]) begin
        failures++;
        if (failures < 20) $display("frame %0d bin %0d count %0d exp %0d", f, i, hist_rdata, cnt[i]);
      end
    end
  endtask

  initial begin
    // stimulus and reference
    S = new[NF * TOTAL];
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < TOTAL; k++)
        S[f * TOTAL + k] = (k < FRAME) ? pixel_of(f, k) : 0;
    run(HRES, S, dxm, dym, dok, rm, gm, rok);

    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;

    for (int f = 0; f < NF; f++) begin
      bit gaps = GAPS && (f != NF - 1);
      @(negedge clk);
      checks++;
      if (!hist_ready || !pix_in_ready) failures++;
      clear_hist();
      out_k = 0; grad_k = 0; t_first_out = -1;
      mode = 2'(MODES[f]);
      n_mode[MODES[f]]++;
      for (int k = 0; k < FRAME; k++) begin
        @(negedge clk);
        while (gaps && ($urandom % 4 == 0)) begin
          pix_in_valid = 0;
          @(negedge clk);
        end
        pix_in_valid = 1;
        pix_in = 8'(S[f * TOTAL + k]);
        if (k == 0) t_start = longint'($time);
        @(posedge clk);
      end
      @(negedge clk); pix_in_valid = 0;
      do @(negedge clk); while (!frame_done);
      t_done = longint'($time);
      // frame_done is in the cycle after the last step: let its outputs be counted
      @(posedge clk); #1;
      checks += 2;
      if (out_k != FRAME) begin failures++; $display("frame %0d: %0d outputs", f, out_k); end
      if (grad_k != FRAME) begin failures++; $display("frame %0d: %0d gradients", f, grad_k); end
      if (!gaps) begin
        // latency and throughput: one pixel per clock, flush of 2*HRES+44
        checks += 2;
        // times: step 0 is seen at a falling edge, outputs at the rising edge
        // closing their valid cycle, frame_done at a falling edge
        if (t_first_out - t_start != 10 * longint'(MODES[f] == 3 ? 2 * HRES + 45 : 1) + 5) begin
          failures++;
          $display("latency %0d", t_first_out - t_start);
        end
        if (t_done - t_start != 10 * longint'(TOTAL)) begin
          failures++;
          $display("frame took %0d time units", t_done - t_start);
        end
      end
      @(negedge clk);
      if (f > 0) check_hist(f);
      cur_frame++;
    end

    // every mechanism must have happened
    checks += 7;
    if (n_stall == 0) begin failures++; $display("no input stall"); end
    if (n_flush == 0) begin failures++; $display("no flush"); end
    for (int i = 1; i < 4; i += 2) if (n_mode[i] == 0) begin failures++; $display("mode %0d unused", i); end
    if (n_fwd == 0) begin failures++; $display("no histogram forwarding"); end
    if (n_byp == 0) begin failures++; $display("no histogram bypass"); end
    if (n_zdiv == 0) begin failures++; $display("no zero divisor"); end
    checks += 2;
    if (n_hread == 0) failures++;
    if (n_hclear == 0) failures++;
    $display("events: stall=%0d flush=%0d fwd=%0d byp=%0d zdiv=%0d hread=%0d hclear=%0d modes=%0d/%0d/%0d/%0d",
             n_stall, n_flush, n_fwd, n_byp, n_zdiv, n_hread, n_hclear, n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
