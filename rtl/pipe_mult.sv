// pipe_mult: pipelined unsigned multiplier built as a binary adder tree.
//
// Operand b selects WIDTH_B partial products (a shifted left by j where b[j]
// is set). They are the leaves of a complete binary tree kept as one vector:
// node i sums nodes 2i and 2i+1, the leaves are nodes WIDTH_B..2*WIDTH_B-1,
// and the root is node 1. Every internal node is a register, so one level of
// additions is done per step and p = a*b appears log2(WIDTH_B) steps after a
// and b are sampled. A new pair may enter every step. WIDTH_B must be a power
// of two and at least 2. Signs are handled outside: operands are magnitudes.
//
// The tree organisation and latency follow the document; the node numbering
// (root at 1) is this design's reading of it.
module pipe_mult #(
  parameter int unsigned WIDTH_A = 8,
  parameter int unsigned WIDTH_B = 8,
  localparam int unsigned PW     = WIDTH_A + WIDTH_B
) (
  input  logic               clk,
  input  logic               ce,
  input  logic [WIDTH_A-1:0] a,
  input  logic [WIDTH_B-1:0] b,
  output logic [PW-1:0]      p
);

  logic [PW-1:0] leaf [WIDTH_B];      // partial products, node WIDTH_B + j
  logic [PW-1:0] node [1:WIDTH_B-1];  // registered tree nodes

  always_comb begin
    for (int j = 0; j < WIDTH_B; j++)
      leaf[j] = b[j] ? (PW'(a) << j) : '0;
  end

  function automatic logic [PW-1:0] child(int unsigned k);
    return (k >= WIDTH_B) ? leaf[k - WIDTH_B] : node[k];
  endfunction

  always_ff @(posedge clk) begin
    if (ce) begin
      for (int unsigned i = 1; i < WIDTH_B; i++)
        node[i] <= child(2*i) + child(2*i + 1);
    end
  end

  assign p = node[1];

  initial assert (WIDTH_B >= 2 && (WIDTH_B & (WIDTH_B - 1)) == 0)
    else $error("pipe_mult: WIDTH_B must be a power of two >= 2");

endmodule
