// e1_indicator -- error indication line E1.
//
// E1 is the actual output parity (from the parity tree) gated by a private
// copy of the characteristic function: E1 = parity & cf. On the OFF-set of
// the characteristic function E1 is forced to 0, the same value the partial
// parity predictor forces on E2, so the pair (E1, E2) shows "no error" there
// whatever the circuit does. On the ON-set E1 is the true parity and is
// compared against the predicted parity E2.
//
// Interface: in is the primary-input vector feeding the characteristic
// function, parity the output of the parity tree, e1 the indication line.
// Parameters are those of char_function. Timing: combinational.
module e1_indicator #(
  parameter int unsigned N     = 4,
  parameter int unsigned IDX_I = 3,
  parameter int unsigned IDX_J = 1,
  parameter bit          NEG_I = 1'b1,
  parameter bit          NEG_J = 1'b1
) (
  input  logic [N-1:0] in,
  input  logic         parity,
  output logic         e1
);

  logic cf;

  char_function #(
    .N(N), .IDX_I(IDX_I), .IDX_J(IDX_J), .NEG_I(NEG_I), .NEG_J(NEG_J)
  ) u_cf (
    .in (in),
    .cf (cf)
  );

  always_comb e1 = parity & cf;

endmodule
