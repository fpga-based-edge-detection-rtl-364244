// delay_line: N registers in a chain, advanced together by ce.
//
// After each step q is the value d had N steps earlier. Used to line up the
// branches of the pipeline (centre derivatives against second derivatives,
// the gradient magnitude against the second directional derivative).
// Registers have no reset; N must be at least 1.
module delay_line #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         ce,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] stage [N];

  always_ff @(posedge clk) begin
    if (ce) begin
      stage[0] <= d;
      for (int i = 1; i < N; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[N-1];

endmodule
