// tb_histogram: clears a 16-bin histogram through the host write port, feeds
// a random stream rich in repeats ([x x], [x y x], [x x x]) with gaps, then
// reads every bin through the host read port and compares with a model.
// Repeats until both hazard paths (forwarding and bypassing) have been used.
module tb_histogram;
  localparam int unsigned BIN_W = 4, CNT_W = 12, NB = 1 << BIN_W;
  logic clk = 0, rst_n = 0;
  logic in_wen = 0;
  logic [BIN_W-1:0] in_data = 0, hist_raddr = 0, hist_waddr = 0;
  logic hist_ren = 0, hist_wen = 0, hist_ready, fwd_hit, byp_used;
  logic [CNT_W-1:0] hist_rdata, hist_wdata = 0;
  int checks = 0, failures = 0, n_fwd = 0, n_byp = 0;
  int model [NB];

  histogram #(.BIN_W(BIN_W), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (fwd_hit) n_fwd++;
    if (byp_used) n_byp++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [BIN_W-1:0] prev1, prev2;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      // clear
      @(negedge clk);
      checks++;
      if (!hist_ready) failures++;
      for (int i = 0; i < NB; i++) begin
        @(negedge clk); hist_wen = 1; hist_waddr = BIN_W'(i); hist_wdata = '0; model[i] = 0;
      end
      @(negedge clk); hist_wen = 0;
      // stream
      prev1 = 0; prev2 = 0;
      for (int t = 0; t < 600; t++) begin
        @(negedge clk);
        in_wen = ($urandom % 6) != 0;
        case ($urandom % 4)
          0: in_data = prev1;                 // [x x]
          1: in_data = prev2;                 // [x y x]
          default: in_data = BIN_W'($urandom);
        endcase
        if (in_wen) begin
          model[in_data]++;
          prev2 = prev1; prev1 = in_data;
        end
      end
      @(negedge clk); in_wen = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (!hist_ready) failures++;
      // read back
      for (int i = 0; i < NB; i++) begin
        @(negedge clk); hist_ren = 1; hist_raddr = BIN_W'(i);
        @(negedge clk); hist_ren = 0;
        checks++;
        if (int'(hist_rdata) != model[i]) begin
          failures++;
          $display("bin %0d got %0d exp %0d", i, hist_rdata, model[i]);
        end
      end
    end
    checks++;
    if (n_fwd == 0 || n_byp == 0) begin
      failures++;
      $display("hazard paths not both exercised: fwd=%0d byp=%0d", n_fwd, n_byp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
