// tb_dual_port_ram: random writes and reads against an array model, including
// reads of the address written in the same cycle (old data expected) and
// holding of rdata while re is low.
module tb_dual_port_ram;
  localparam int unsigned DEPTH = 16, W = 8;
  logic clk = 0, we = 0, re = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  int checks = 0, failures = 0, collisions = 0;
  logic [W-1:0] model [DEPTH];
  logic [W-1:0] expect_q;

  dual_port_ram #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every entry
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 4'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    expect_q = rdata;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we = 1'($urandom); re = 1'($urandom);
      waddr = 4'($urandom); wdata = 8'($urandom);
      raddr = ($urandom % 4 == 0) ? waddr : 4'($urandom);
      if (re) expect_q = model[raddr];
      if (re && we && raddr == waddr) collisions++;
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("mismatch t=%0d raddr=%0d got %h exp %h", t, raddr, rdata, expect_q);
      end
    end
    checks++;
    if (collisions == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
