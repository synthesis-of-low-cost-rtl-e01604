// partial_parity_predictor -- error indication line E2 of the worked example.
//
// The full parity predictor would compute PP = A.B' + B'.C + A.B.C.D, the
// parity of the function outputs from the primary inputs. Its cost lies in
// the lone minterm A.B.C.D. With the characteristic function cf = A' + C'
// the inputs with A = C = 1 become don't-cares for the predictor, which then
// simplifies to A.B' + B'.C; gating that by its own (merged) copy of cf gives
//   E2 = PPP = A.B'.C' + A'.B'.C
// which is what this block computes. E2 equals PP & cf on every input, so it
// agrees with E1 = parity & cf while the function logic is fault free, and
// both are 0 on the OFF-set. Input D is not needed at all.
//
// Interface: x carries the primary inputs, e2 is the indication line.
// Timing: combinational.
module partial_parity_predictor
  import ppsc_pkg::*;
(
  input  ex_in_t x,
  output logic   e2
);

  always_comb begin
    e2 = (x.a & ~x.b & ~x.c) | (~x.a & ~x.b & x.c);
  end

endmodule
