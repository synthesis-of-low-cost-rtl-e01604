// parity_tree -- XOR tree over the M primary outputs of the function logic.
//
// Its output is the actual parity O1 ^ O2 ^ ... ^ OM of the outputs, the line
// that drives the error indication signal E1 (after gating by the
// characteristic function). The tree is built as a balanced binary tree of
// two-input XOR gates, depth ceil(log2 M), written as a recursive reduction
// over a power-of-two padded vector.
//
// Interface: o is the output word of the function logic, p its parity.
// Timing: purely combinational.
module parity_tree #(
  parameter int unsigned M = 3   // number of function outputs (3 in the example)
) (
  input  logic [M-1:0] o,
  output logic         p
);

  localparam int unsigned LEVELS = (M <= 1) ? 1 : $clog2(M);
  localparam int unsigned LEAVES = 1 << LEVELS;

  // node[k] of the heap-ordered tree: leaves at LEAVES..2*LEAVES-1, root at 1.
  logic [2*LEAVES-1:0] node;

  always_comb begin
    node = '0;
    for (int unsigned i = 0; i < LEAVES; i++)
      node[LEAVES + i] = (i < M) ? o[i] : 1'b0;
    for (int unsigned k = LEAVES - 1; k >= 1; k--)
      node[k] = node[2*k] ^ node[2*k + 1];
    p = node[1];
  end

endmodule
