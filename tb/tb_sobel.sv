// tb_sobel: random windows into four sobel instances (X and Y, unsigned
// pixels and signed derivatives), random enable. After every enabled step the
// outputs must equal the kernel sum, and the sum divided by 8 rounded down,
// of the window sampled 4 steps earlier.
module tb_sobel;
  import edge_pkg::*;
  localparam int unsigned W = 8, LAT = 4;
  logic clk = 0, ce = 0;
  logic [2:0][2:0][W-1:0] win = '0;
  logic signed [W+2:0] x8 [4];
  logic signed [W-1:0] res [4];
  int checks = 0, failures = 0;
  int exp_q [4][$];

  sobel #(.AXIS(SOBEL_X), .W(W), .IN_SIGNED(1'b0)) u0 (.clk, .ce, .win, .result_x8(x8[0]), .result(res[0]));
  sobel #(.AXIS(SOBEL_Y), .W(W), .IN_SIGNED(1'b0)) u1 (.clk, .ce, .win, .result_x8(x8[1]), .result(res[1]));
  sobel #(.AXIS(SOBEL_X), .W(W), .IN_SIGNED(1'b1)) u2 (.clk, .ce, .win, .result_x8(x8[2]), .result(res[2]));
  sobel #(.AXIS(SOBEL_Y), .W(W), .IN_SIGNED(1'b1)) u3 (.clk, .ce, .win, .result_x8(x8[3]), .result(res[3]));

  always #5 clk = ~clk;

  function automatic int tap(int r, int c, bit sgn);
    return sgn ? int'(signed'(win[r][c])) : int'(win[r][c]);
  endfunction

  function automatic int ksum(bit y, bit sgn);
    if (!y) return (tap(0,2,sgn) - tap(0,0,sgn)) + 2 * (tap(1,2,sgn) - tap(1,0,sgn)) + (tap(2,2,sgn) - tap(2,0,sgn));
    return (tap(2,0,sgn) - tap(0,0,sgn)) + 2 * (tap(2,1,sgn) - tap(0,1,sgn)) + (tap(2,2,sgn) - tap(0,2,sgn));
  endfunction

  function automatic int fdiv8(int v);
    return (v >= 0) ? v / 8 : -((-v + 7) / 8);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      ce = ($urandom % 4) != 0;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          // extremes now and then
          win[r][c] = ($urandom % 8 == 0) ? (($urandom % 2) ? 8'hFF : 8'h00)
                    : ($urandom % 8 == 1) ? (($urandom % 2) ? 8'h7F : 8'h80) : 8'($urandom);
      @(posedge clk);
      if (ce) for (int i = 0; i < 4; i++) exp_q[i].push_back(ksum(i[0], i[1]));
      #1;
      if (ce && exp_q[0].size() > LAT) begin
        for (int i = 0; i < 4; i++) begin
          automatic int e = exp_q[i][exp_q[i].size() - LAT];
          checks += 2;
          if (int'(x8[i]) != e || int'(res[i]) != fdiv8(e)) begin
            failures++;
            if (failures < 10) $display("t=%0d inst %0d got %0d/%0d exp %0d", t, i, x8[i], res[i], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
