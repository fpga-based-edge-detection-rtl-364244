// tb_delay_line: random data with a random enable; q must equal d of N
// enabled steps earlier and hold while ce is low.
module tb_delay_line;
  localparam int unsigned N = 4, W = 8;
  logic clk = 0, ce = 0;
  logic [W-1:0] d = 0, q;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];
  logic [W-1:0] last_q;

  delay_line #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      ce = ($urandom % 4) != 0;
      d  = 8'($urandom);
      last_q = q;
      @(posedge clk); #1;
      if (ce) begin
        hist.push_back(d);
        if (hist.size() >= N) begin
          checks++;
          if (q !== hist[hist.size() - N]) failures++;
        end
      end else if (hist.size() >= N) begin
        checks++;
        if (q !== last_q) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
