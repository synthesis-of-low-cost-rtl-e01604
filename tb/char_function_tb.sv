// char_function_tb -- self-checking test of the characteristic function.
//
// The example instance (A' + C' over {A,B,C,D}) is tested on all 16 inputs:
// it must be 0 exactly when A = C = 1. A second instance with other literals
// and phases (I2 + I5' over 6 inputs) checks the parameterisation on all 64
// inputs.
module char_function_tb;

  logic [3:0] in4;
  logic [5:0] in6;
  logic cf_ex, cf_b;
  int checks = 0;
  int failures = 0;
  int off_count = 0;

  char_function dut_ex (.in(in4), .cf(cf_ex));
  char_function #(.N(6), .IDX_I(2), .IDX_J(5), .NEG_I(1'b0), .NEG_J(1'b1))
    dut_b (.in(in6), .cf(cf_b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      in4 = i[3:0];
      #1;
      checks++;
      if (cf_ex !== !(in4[3] && in4[1])) begin
        failures++;
        $display("FAIL example in=%b cf=%b", in4, cf_ex);
      end
      if (!cf_ex) off_count++;
    end
    // the OFF-set of A' + C' is the cube A.C: 4 of 16 inputs
    checks++;
    if (off_count != 4) begin
      failures++;
      $display("FAIL OFF-set size %0d", off_count);
    end
    for (int i = 0; i < 64; i++) begin
      in6 = i[5:0];
      #1;
      checks++;
      if (cf_b !== (in6[2] || !in6[5])) begin
        failures++;
        $display("FAIL second in=%b cf=%b", in6, cf_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
