// ppsc_pkg -- types and constants shared by the partially self-checking
// circuit of the worked example (a 4-input function protected by partial
// parity prediction).
//
// The example circuit has four primary inputs A, B, C, D. They travel as the
// packed struct ex_in_t, with A in the most significant bit, so that the same
// bits can also be handled as a plain 4-bit vector {A,B,C,D} by the generic
// blocks (parity tree, characteristic function).
//
// The function logic can be given one single stuck-at fault on one of its
// internal gate outputs through a stuck_at_t word. This is how the coverage of
// the scheme is measured: every internal single stuck-at fault of the function
// logic is injected, one at a time, while patterns are applied. The fault port
// is this design's own addition for that measurement; tie it to FAULT_NONE in
// normal use.
package ppsc_pkg;

  // Number of primary inputs and outputs of the example function logic.
  localparam int unsigned N_IN  = 4;
  localparam int unsigned N_OUT = 3;

  // Primary inputs of the example, A is bit 3 and D is bit 0.
  typedef struct packed {
    logic a;
    logic b;
    logic c;
    logic d;
  } ex_in_t;

  // Bit positions of the inputs inside the 4-bit vector view of ex_in_t.
  localparam int unsigned IDX_A = 3;
  localparam int unsigned IDX_B = 2;
  localparam int unsigned IDX_C = 1;
  localparam int unsigned IDX_D = 0;

  // Internal gate outputs of the function logic that can carry a fault.
  typedef enum logic [2:0] {
    NODE_N1 = 3'd0,   // A | C        (drives O1 and gate N2)
    NODE_N2 = 3'd1,   // B & N1       (drives O2 and gate N5)
    NODE_N3 = 3'd2,   // A & C
    NODE_N4 = 3'd3,   // N3 & D
    NODE_N5 = 3'd4    // N2 & N4      (drives O3)
  } node_e;

  localparam int unsigned N_NODES = 5;

  // One single stuck-at fault: enable, site and stuck value.
  typedef struct packed {
    logic  en;
    node_e node;
    logic  value;
  } stuck_at_t;

  localparam stuck_at_t FAULT_NONE = '{en: 1'b0, node: NODE_N1, value: 1'b0};

endpackage
