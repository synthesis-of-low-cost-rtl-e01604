// char_function -- characteristic function of the partial CED scheme.
//
// Two primary-input literals S_i and S_j, each taken in a chosen phase, are
// ORed: cf = S_i | S_j. Concurrent error detection is active while cf = 1
// (ON-set) and disabled while cf = 0 (OFF-set). Because the function is an
// OR of two literals, both selected inputs still toggle freely while checking
// stays enabled, and the OFF-set is a single cube. In the worked example the
// literals are A' and C', so cf = A' | C' and checking is off only for A = C = 1.
//
// Each error indication line has its own instance of this block, so that a
// single stuck-at fault on one copy cannot silence both lines.
//
// Interface: in is the primary-input vector; IDX_I / IDX_J select the two
// inputs, NEG_I / NEG_J pick the complemented phase. Timing: combinational.
module char_function #(
  parameter int unsigned N     = 4,  // number of primary inputs
  parameter int unsigned IDX_I = 3,  // first literal's input (A in the example)
  parameter int unsigned IDX_J = 1,  // second literal's input (C in the example)
  parameter bit          NEG_I = 1'b1,
  parameter bit          NEG_J = 1'b1
) (
  input  logic [N-1:0] in,
  output logic         cf
);

  always_comb begin
    cf = (in[IDX_I] ^ NEG_I) | (in[IDX_J] ^ NEG_J);
  end

endmodule
