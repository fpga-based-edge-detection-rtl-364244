// shift_mem: a shift register of DEPTH stages built from a dual-port memory.
//
// Two address counters run round a DEPTH-entry memory: the write counter
// starts at 0 and the read counter at 1, so the read pointer always trails the
// write pointer by DEPTH-1 entries. Each step with we high writes d, reads the
// oldest entry and advances both counters; the registered read data gives
// q = the value of d DEPTH steps earlier, exactly as DEPTH chained registers
// clocked by we would. Counter starting values come from a synchronous
// active-low reset (this design's choice; the counters' initial values are the
// only state that matters). Until DEPTH values have been written, q returns
// the memory's power-up contents.
module shift_mem #(
  parameter int unsigned DEPTH = 1021,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [AW-1:0] waddr, raddr;

  function automatic logic [AW-1:0] wrap_inc(logic [AW-1:0] a);
    return (a == AW'(DEPTH - 1)) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      waddr <= '0;
      raddr <= AW'(1);
    end else if (we) begin
      waddr <= wrap_inc(waddr);
      raddr <= wrap_inc(raddr);
    end
  end

  dual_port_ram #(.DEPTH(DEPTH), .W(W)) u_ram (
    .clk  (clk),
    .we   (we),
    .waddr(waddr),
    .wdata(d),
    .re   (we),
    .raddr(raddr),
    .rdata(q)
  );

  initial assert (DEPTH >= 2) else $error("shift_mem: DEPTH must be at least 2");

endmodule
