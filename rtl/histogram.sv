// histogram: counts values into bins at one value per clock.
//
// Each value p that arrives with in_wen goes through three stages on a
// dual-port memory: (1) read hist[p], (2) add one, (3) write hist[p] back.
// Because a read and a write happen in every cycle, two read-after-write
// hazards arise and are resolved by two comparators:
//   [x x]    the previous value is the same bin and its count is still in
//            stage 3: stage 2 takes the stage-3 count (forwarding);
//   [x y x]  the bin being read is being written in the same cycle, so the
//            memory returns the old count: the count being written is caught
//            in a bypass register and used in stage 2 instead (bypassing).
// Forwarding wins over bypassing, being the more recent count.
//
// The control unit keeps a valid bit per stage and raises hist_ready when no
// value is in flight. While hist_ready is high a host may read bins through
// hist_raddr/hist_ren (data on hist_rdata one cycle later) and write them
// through hist_waddr/hist_wdata/hist_wen, for instance to clear them between
// frames. Pipeline accesses have priority over host accesses. The memory is
// not reset; it must be cleared through the write port before use.
//
// The three stages, the dual-port memory, both hazard cases and the two
// comparators follow the document; the bypass register, the priorities and
// the host-port timing are this design's choices.
module histogram #(
  parameter int unsigned BIN_W = 8,
  parameter int unsigned CNT_W = 19
) (
  input  logic             clk,
  input  logic             rst_n,
  // data-flow input
  input  logic             in_wen,
  input  logic [BIN_W-1:0] in_data,
  // host read port
  input  logic [BIN_W-1:0] hist_raddr,
  input  logic             hist_ren,
  output logic [CNT_W-1:0] hist_rdata,
  // host write port
  input  logic [BIN_W-1:0] hist_waddr,
  input  logic [CNT_W-1:0] hist_wdata,
  input  logic             hist_wen,
  output logic             hist_ready,
  // hazard events, for observation
  output logic             fwd_hit,
  output logic             byp_used
);

  // stage registers
  logic             stage2_wen, stage3_wen;
  logic [BIN_W-1:0] stage2_pix, stage3_pix;
  logic [CNT_W-1:0] stage3_cnt;
  logic             byp_hit;
  logic [CNT_W-1:0] byp_cnt;

  // memory ports
  logic             mem_we, mem_re;
  logic [BIN_W-1:0] mem_waddr, mem_raddr;
  logic [CNT_W-1:0] mem_wdata, mem_rdata;

  assign mem_re    = in_wen | hist_ren;
  assign mem_raddr = in_wen ? in_data : hist_raddr;
  assign mem_we    = stage3_wen | hist_wen;
  assign mem_waddr = stage3_wen ? stage3_pix : hist_waddr;
  assign mem_wdata = stage3_wen ? stage3_cnt : hist_wdata;

  dual_port_ram #(.DEPTH(2**BIN_W), .W(CNT_W)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));

  assign hist_rdata = mem_rdata;

  // comparators
  logic byp_now;
  assign byp_now = in_wen && stage3_wen && (in_data == stage3_pix);
  assign fwd_hit = stage2_wen && stage3_wen && (stage2_pix == stage3_pix);
  assign byp_used = stage2_wen && byp_hit && !fwd_hit;

  logic [CNT_W-1:0] base;
  always_comb begin
    if (fwd_hit)      base = stage3_cnt;
    else if (byp_hit) base = byp_cnt;
    else              base = mem_rdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stage2_wen <= 1'b0;
      stage3_wen <= 1'b0;
      byp_hit    <= 1'b0;
    end else begin
      stage2_wen <= in_wen;
      stage3_wen <= stage2_wen;
      byp_hit    <= byp_now;
    end
  end

  always_ff @(posedge clk) begin
    stage2_pix <= in_data;
    stage3_pix <= stage2_pix;
    stage3_cnt <= base + 1'b1;
    byp_cnt    <= stage3_cnt;
  end

  assign hist_ready = !stage2_wen && !stage3_wen;

  // host accesses only while the pipeline is idle
  a_host_read_idle : assert property (@(posedge clk) disable iff (!rst_n)
    hist_ren |-> !in_wen);
  a_host_write_idle : assert property (@(posedge clk) disable iff (!rst_n)
    hist_wen |-> !stage3_wen);

endmodule
