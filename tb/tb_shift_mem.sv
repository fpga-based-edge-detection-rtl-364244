// tb_shift_mem: drives a shift_mem with a random enable and checks that after
// every enabled step q equals the value written DEPTH steps earlier, and that
// q holds between steps.
module tb_shift_mem;
  localparam int unsigned DEPTH = 7, W = 8;
  logic clk = 0, rst_n = 0, we = 0;
  logic [W-1:0] d = 0, q;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];
  logic [W-1:0] last_q;

  shift_mem #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = ($urandom % 3) != 0;
      d  = 8'($urandom);
      last_q = q;
      @(posedge clk); #1;
      if (we) begin
        hist.push_back(d);
        if (hist.size() >= DEPTH) begin
          checks++;
          if (q !== hist[hist.size() - DEPTH]) begin
            failures++;
            $display("t=%0d q=%h exp %h", t, q, hist[hist.size() - DEPTH]);
          end
        end
      end else begin
        checks++;
        if (q !== last_q) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
