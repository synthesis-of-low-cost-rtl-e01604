// e1_indicator_tb -- self-checking test of the E1 gating.
//
// For all 16 inputs and both parity values, E1 must equal the parity while
// the characteristic function A' + C' is 1 and must be 0 while A = C = 1.
module e1_indicator_tb;

  logic [3:0] in;
  logic parity, e1;
  int checks = 0;
  int failures = 0;

  e1_indicator dut (.in(in), .parity(parity), .e1(e1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {in, parity} = i[4:0];
      #1;
      checks++;
      if (e1 !== ((in[3] && in[1]) ? 1'b0 : parity)) begin
        failures++;
        $display("FAIL in=%b parity=%b e1=%b", in, parity, e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
