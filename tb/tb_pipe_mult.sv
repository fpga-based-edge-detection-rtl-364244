// tb_pipe_mult: random operands (plus all-ones extremes) into an 8x8 and an
// 8x16 multiplier with a random enable; p must be the product of the operands
// sampled log2(WIDTH_B) enabled steps earlier (3 and 4 steps).
module tb_pipe_mult;
  logic clk = 0, ce = 0;
  logic [7:0]  a = 0, b8 = 0;
  logic [15:0] b16 = 0;
  logic [15:0] p8;
  logic [23:0] p16;
  int checks = 0, failures = 0;
  longint q8 [$], q16 [$];

  pipe_mult #(.WIDTH_A(8), .WIDTH_B(8))  u8  (.clk, .ce, .a, .b(b8),  .p(p8));
  pipe_mult #(.WIDTH_A(8), .WIDTH_B(16)) u16 (.clk, .ce, .a, .b(b16), .p(p16));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ce  = ($urandom % 4) != 0;
      a   = ($urandom % 10 == 0) ? 8'hFF : 8'($urandom);
      b8  = ($urandom % 10 == 0) ? 8'hFF : 8'($urandom);
      b16 = ($urandom % 10 == 0) ? 16'hFFFF : 16'($urandom);
      @(posedge clk);
      if (ce) begin
        q8.push_back(longint'(a) * b8);
        q16.push_back(longint'(a) * b16);
      end
      #1;
      if (ce && q8.size() > 4) begin
        checks += 2;
        if (longint'(p8)  != q8[q8.size() - 3])   failures++;
        if (longint'(p16) != q16[q16.size() - 4]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
