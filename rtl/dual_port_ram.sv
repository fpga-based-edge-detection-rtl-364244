// dual_port_ram: simple dual-port memory with one write port and one
// synchronous read port, the shape of an FPGA block RAM.
//
// A write stores wdata at waddr on the clock edge when we is high. A read with
// re high registers mem[raddr] into rdata on the same edge; a read of the
// address being written in that cycle returns the old contents (read first).
// rdata holds its value while re is low. The memory has no reset.
module dual_port_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
