// tb_pipe_div: random dividend/divisor pairs within the divider's range
// (a < b * 2**QW) with a random enable; q must be floor(a/b) of the pair
// sampled QW enabled steps earlier. Also a 4-bit-quotient divider.
module tb_pipe_div;
  localparam int unsigned QW = 19, AW = 27, BW = 16;
  logic clk = 0, ce = 0;
  logic [AW-1:0] a = 0;
  logic [BW-1:0] b = 1;
  logic [QW-1:0] q;
  logic [7:0] a4 = 0;
  logic [3:0] b4 = 1;
  logic [3:0] q4;
  int checks = 0, failures = 0;
  longint eq [$], eq4 [$];

  pipe_div #(.QW(QW), .AW(AW), .BW(BW)) dut (.clk, .ce, .a, .b, .q);
  pipe_div #(.QW(4), .AW(8), .BW(4)) dut4 (.clk, .ce, .a(a4), .b(b4), .q(q4));

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
      ce = ($urandom % 4) != 0;
      b  = BW'($urandom % 65535 + 1);
      if ($urandom % 4 == 0) b = BW'($urandom % 16 + 1);
      a  = AW'({$urandom, $urandom} % (longint'(b) << QW));
      if (a >= (1 << AW)) a = AW'((1 << AW) - 1);
      b4 = 4'($urandom % 15 + 1);
      a4 = 8'($urandom % (b4 * 16));
      @(posedge clk);
      if (ce) begin
        eq.push_back(longint'(a) / b);
        eq4.push_back(longint'(a4) / b4);
      end
      #1;
      if (ce && eq.size() > QW) begin
        checks += 2;
        if (longint'(q)  != eq[eq.size() - QW])  begin failures++; if (failures < 10) $display("q=%0d exp %0d", q, eq[eq.size()-QW]); end
        if (longint'(q4) != eq4[eq4.size() - 4]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
