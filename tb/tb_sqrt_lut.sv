// tb_sqrt_lut: every 16-bit input in order with the enable held high, then a
// random stretch with a random enable; r must be floor(sqrt(x)) of the value
// sampled 3 steps earlier.
module tb_sqrt_lut;
  localparam int unsigned LAT = 3;
  logic clk = 0, ce = 0;
  logic [15:0] x = 0;
  logic [7:0] r;
  int checks = 0, failures = 0;
  int eq [$];

  sqrt_lut dut (.*);

  always #5 clk = ~clk;

  function automatic int isqrt(int v);
    int s = 0;
    while ((s + 1) * (s + 1) <= v) s++;
    return s;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic en, input logic [15:0] v);
    @(negedge clk);
    ce = en; x = v;
    @(posedge clk);
    if (ce) eq.push_back(isqrt(int'(v)));
    #1;
    if (ce && eq.size() > LAT) begin
      checks++;
      if (int'(r) != eq[eq.size() - LAT]) begin
        failures++;
        if (failures < 10) $display("x=%0d r=%0d exp %0d", eq.size() - LAT, r, eq[eq.size() - LAT]);
      end
    end
  endtask

  initial begin
    for (int v = 0; v < 65536; v++) step(1'b1, 16'(v));
    for (int t = 0; t < 3000; t++) step(1'(($urandom % 3) != 0), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
