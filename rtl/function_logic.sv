// function_logic -- the multilevel logic circuit that is being protected
// (the "function logic" of the partially self-checking structure).
//
// The scheme is shown on a 4-input circuit whose output parity
//   PP(A,B,C,D) = A.B' + B'.C + A.B.C.D
// is the function to be predicted. Only that parity function is fixed by the
// scheme; the gates of the circuit itself are this design's choice: a small
// three-output netlist with shared internal nodes, so that single faults
// produce both single-bit (odd) and double-bit (even) output errors:
//   N1 = A | C          O1 = N1
//   N2 = B & N1         O2 = N2
//   N3 = A & C
//   N4 = N3 & D
//   N5 = N2 & N4        O3 = N5 = A.B.C.D
// so that O1 ^ O2 ^ O3 = B'.(A + C) + A.B.C.D = PP.
//
// Interface: x carries the primary inputs, o = {O3, O2, O1}. The fault port
// forces one internal gate output to a stuck value (single stuck-at model);
// it exists for coverage measurement and is tied to FAULT_NONE otherwise.
// Timing: purely combinational, no clock.
module function_logic
  import ppsc_pkg::*;
(
  input  ex_in_t                 x,
  input  stuck_at_t              fault,
  output logic [N_OUT-1:0]       o
);

  logic n1, n2, n3, n4, n5;

  // Value of a gate output after the (optional) stuck-at fault at its site.
  function automatic logic site(input stuck_at_t f, input node_e id, input logic good);
    return (f.en && f.node == id) ? f.value : good;
  endfunction

  always_comb begin
    n1 = site(fault, NODE_N1, x.a | x.c);
    n2 = site(fault, NODE_N2, x.b & n1);
    n3 = site(fault, NODE_N3, x.a & x.c);
    n4 = site(fault, NODE_N4, n3 & x.d);
    n5 = site(fault, NODE_N5, n2 & n4);
    o  = {n5, n2, n1};
  end

endmodule
