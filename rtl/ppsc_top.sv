// ppsc_top -- partially self-checking circuit with partial parity prediction.
//
// The function logic computes the primary outputs. A parity tree XORs them;
// that actual parity, gated by one copy of the characteristic function
// cf = A' + C', is the error indication line E1. The partial parity predictor
// computes E2, the predicted parity already gated by its own merged copy of
// the characteristic function. A fault-free circuit always gives E1 = E2; an
// output error of odd multiplicity that occurs while cf = 1 gives E1 != E2.
// While cf = 0 (A = C = 1) both lines are held at 0 and checking is off: this
// is the don't-care space that made the predictor cheaper.
//
// Interface: x = primary inputs {A,B,C,D}; fault = optional single stuck-at
// fault inside the function logic (FAULT_NONE in normal use, used for
// coverage measurement); o = {O3,O2,O1}; e1, e2 = error indication pair,
// "error" when they differ. The comparison of E1 and E2 is left to whatever
// observes the pair, so that both lines stay separately testable.
// Timing: purely combinational.
module ppsc_top
  import ppsc_pkg::*;
(
  input  ex_in_t           x,
  input  stuck_at_t        fault,
  output logic [N_OUT-1:0] o,
  output logic             e1,
  output logic             e2
);

  logic parity;

  function_logic u_func (
    .x     (x),
    .fault (fault),
    .o     (o)
  );

  parity_tree #(.M(N_OUT)) u_ptree (
    .o (o),
    .p (parity)
  );

  e1_indicator #(
    .N(N_IN), .IDX_I(IDX_A), .IDX_J(IDX_C), .NEG_I(1'b1), .NEG_J(1'b1)
  ) u_e1 (
    .in     (x),
    .parity (parity),
    .e1     (e1)
  );

  partial_parity_predictor u_ppp (
    .x  (x),
    .e2 (e2)
  );

endmodule
