// tb_neighbourhood: streams random pixels with a random enable into a small
// neighbourhood (HRES = 8) and checks all nine taps after every step against
// the stream: tap (r,c) must hold pixel n - (2-r)*HRES - (2-c).
module tb_neighbourhood;
  localparam int unsigned HRES = 8, W = 8;
  logic clk = 0, rst_n = 0, ce = 0;
  logic [W-1:0] pix = 0;
  logic [2:0][2:0][W-1:0] win;
  int checks = 0, failures = 0;
  logic [W-1:0] s [$];

  neighbourhood #(.HRES(HRES), .W(W)) dut (.*);

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
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ce  = ($urandom % 5) != 0;
      pix = 8'($urandom);
      @(posedge clk); #1;
      if (ce) begin
        int n;
        s.push_back(pix);
        n = s.size() - 1;
        if (n >= 2 * HRES + 2) begin
          for (int r = 0; r < 3; r++)
            for (int c = 0; c < 3; c++) begin
              checks++;
              if (win[r][c] !== s[n - (2 - r) * HRES - (2 - c)]) begin
                failures++;
                if (failures < 10) $display("n=%0d tap %0d%0d got %h", n, r + 1, c + 1, win[r][c]);
              end
            end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
