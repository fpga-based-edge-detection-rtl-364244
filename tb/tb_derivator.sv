// tb_derivator: random signed derivatives (with zeros and extremes) with a
// random enable. r must equal the truncated quotient of equation
// (dxx dx^2 + 2 dxy dx dy + dyy dy^2) / (dx^2 + dy^2) 32 steps later (0 when
// dx = dy = 0), and gradient_sqr must equal dx^2 + dy^2 10 steps later.
module tb_derivator;
  localparam int unsigned W = 8, QW = 19, LAT_R = 32, LAT_G = 10;
  logic clk = 0, ce = 0;
  logic signed [W-1:0] dx = 0, dy = 0, dxx = 0, dxy = 0, dyy = 0;
  logic signed [QW:0] r;
  logic [2*W-1:0] gradient_sqr;
  int checks = 0, failures = 0, zero_div = 0, neg_r = 0;
  int er [$], eg [$];

  derivator #(.W(W), .QW(QW)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic signed [7:0] rnd();
    case ($urandom % 8)
      0: return 8'sd0;
      1: return -8'sd128;
      2: return 8'sd127;
      default: return 8'($urandom);
    endcase
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      ce = ($urandom % 5) != 0;
      dx = rnd(); dy = rnd(); dxx = rnd(); dxy = rnd(); dyy = rnd();
      if ($urandom % 6 == 0) begin dx = 0; dy = 0; end
      @(posedge clk);
      if (ce) begin
        longint p, q;
        p = longint'(dxx) * dx * dx + 2 * longint'(dxy) * dx * dy + longint'(dyy) * dy * dy;
        q = longint'(dx) * dx + longint'(dy) * dy;
        er.push_back(q == 0 ? 0 : int'(p / q));
        eg.push_back(int'(q));
      end
      #1;
      if (ce && er.size() > LAT_R) begin
        automatic int e = er[er.size() - LAT_R];
        checks++;
        if (int'(r) != e) begin
          failures++;
          if (failures < 10) $display("t=%0d r=%0d exp %0d", t, r, e);
        end
        if (eg[eg.size() - LAT_R] == 0) zero_div++;
        if (e < 0) neg_r++;
      end
      if (ce && eg.size() > LAT_G) begin
        checks++;
        if (int'(gradient_sqr) != eg[eg.size() - LAT_G]) failures++;
      end
    end
    checks++;
    if (zero_div == 0 || neg_r == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
