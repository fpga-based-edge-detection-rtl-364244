// pipe_div: pipelined unsigned array divider, one quotient bit per stage.
//
// Stage k (k = 0..QW-1) decides quotient bit i = QW-1-k: it subtracts the
// divisor shifted left by i from the running remainder and, if the difference
// is not negative, keeps it and sets the bit; otherwise the old remainder is
// passed on unchanged through a multiplexer instead of being restored by an
// addition. Divisor and partial quotient travel with the remainder, so a new
// division may start every step and q = a / b (truncated) appears QW steps
// after a and b are sampled. The result is exact when a < b * 2**QW. With
// b = 0 every bit is set.
//
// The method and the one-stage-per-bit pipeline follow the document.
module pipe_div #(
  parameter int unsigned QW = 19,
  parameter int unsigned AW = 24,
  parameter int unsigned BW = 16
) (
  input  logic          clk,
  input  logic          ce,
  input  logic [AW-1:0] a,
  input  logic [BW-1:0] b,
  output logic [QW-1:0] q
);

  localparam int unsigned RW = ((AW > BW + QW) ? AW : BW + QW) + 1;

  logic [AW-1:0] rem  [QW+1];
  logic [BW-1:0] div  [QW+1];
  logic [QW-1:0] quo  [QW+1];

  assign rem[0] = a;
  assign div[0] = b;
  assign quo[0] = '0;

  for (genvar k = 0; k < QW; k++) begin : g_stage
    localparam int unsigned I = QW - 1 - k;
    logic [RW-1:0] trial;
    assign trial = RW'(rem[k]) - (RW'(div[k]) << I);
    always_ff @(posedge clk) begin
      if (ce) begin
        div[k+1] <= div[k];
        if (!trial[RW-1]) begin
          rem[k+1] <= AW'(trial);
          quo[k+1] <= quo[k] | (QW'(1) << I);
        end else begin
          rem[k+1] <= rem[k];
          quo[k+1] <= quo[k];
        end
      end
    end
  end

  assign q = quo[QW];

endmodule
