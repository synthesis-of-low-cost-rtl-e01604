// partial_parity_predictor_tb -- self-checking test of E2.
//
// On all 16 inputs E2 must be the full predicted parity
// PP = A.B' + B'.C + A.B.C.D wherever the characteristic function A' + C'
// is 1, and 0 wherever it is 0 (A = C = 1). The test also confirms that the
// full and the partial predictor differ on exactly three inputs, all inside
// the OFF-set, and that
// input D does not influence E2.
module partial_parity_predictor_tb;
  import ppsc_pkg::*;

  ex_in_t x;
  logic   e2;
  int checks = 0;
  int failures = 0;
  int differ = 0;

  partial_parity_predictor dut (.x(x), .e2(e2));

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
    logic e2_d0;
    for (int i = 0; i < 16; i++) begin
      x = ex_in_t'(i[3:0]);
      #1;
      checks++;
      if (!(x.a && x.c)) begin
        if (e2 !== pp_ref(x)) begin
          failures++;
          $display("FAIL ON-set x=%b e2=%b pp=%b", x, e2, pp_ref(x));
        end
      end else begin
        if (e2 !== 1'b0) begin
          failures++;
          $display("FAIL OFF-set x=%b e2=%b", x, e2);
        end
      end
      if (e2 != pp_ref(x)) differ++;
      // D must not matter
      e2_d0 = e2;
      x.d = ~x.d;
      #1;
      checks++;
      if (e2 !== e2_d0) begin
        failures++;
        $display("FAIL D dependence x=%b", x);
      end
    end
    // Inside the OFF-set A.C, PP = B' + B.D is 1 on three of its four
    // inputs (A.B'.C.D', A.B'.C.D, A.B.C.D); outside it the two agree.
    checks++;
    if (differ != 3) begin
      failures++;
      $display("FAIL PP and PPP differ on %0d inputs, expected 3", differ);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
