// function_logic_tb -- self-checking test of the example function logic.
//
// All 16 input patterns are applied fault free and then under each of the
// 10 single stuck-at faults (5 internal gate outputs, stuck at 0 and at 1).
// The reference outputs are worked out here from the Boolean equations of
// the outputs with the fault site forced, and the fault-free output parity is
// also checked against the parity function PP = A.B' + B'.C + A.B.C.D.
module function_logic_tb;
  import ppsc_pkg::*;

  ex_in_t           x;
  stuck_at_t        fault;
  logic [N_OUT-1:0] o;

  int checks = 0;
  int failures = 0;

  function_logic dut (.x(x), .fault(fault), .o(o));

  // Reference: outputs {O3,O2,O1} with an optional forced node value.
  function automatic logic [2:0] ref_out(input ex_in_t v, input stuck_at_t f);
    logic n1, n2, n3, n4, n5;
    n1 = (f.en && f.node == NODE_N1) ? f.value : (v.a || v.c);
    n2 = (f.en && f.node == NODE_N2) ? f.value : (v.b && n1);
    n3 = (f.en && f.node == NODE_N3) ? f.value : (v.a && v.c);
    n4 = (f.en && f.node == NODE_N4) ? f.value : (n3 && v.d);
    n5 = (f.en && f.node == NODE_N5) ? f.value : (n2 && n4);
    return {n5, n2, n1};
  endfunction

  function automatic logic pp_ref(input ex_in_t v);
    return (v.a & ~v.b) | (~v.b & v.c) | (v.a & v.b & v.c & v.d);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fault = FAULT_NONE;
    for (int i = 0; i < 16; i++) begin
      x = ex_in_t'(i[3:0]);
      #1;
      checks++;
      if (o !== {x.a & x.b & x.c & x.d, x.b & (x.a | x.c), x.a | x.c}) begin
        failures++;
        $display("FAIL fault-free x=%b o=%b", x, o);
      end
      checks++;
      if ((^o) !== pp_ref(x)) begin
        failures++;
        $display("FAIL parity x=%b o=%b", x, o);
      end
    end
    for (int n = 0; n < N_NODES; n++) begin
      for (int s = 0; s < 2; s++) begin
        fault = '{en: 1'b1, node: node_e'(n), value: s[0]};
        for (int i = 0; i < 16; i++) begin
          x = ex_in_t'(i[3:0]);
          #1;
          checks++;
          if (o !== ref_out(x, fault)) begin
            failures++;
            $display("FAIL node=%0d sa%0d x=%b o=%b exp=%b", n, s, x, o, ref_out(x, fault));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
