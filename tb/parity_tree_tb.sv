// parity_tree_tb -- self-checking test of the XOR tree.
//
// The example width (3 outputs) is tested exhaustively; widths 1, 7 and 35
// (35 being the output count of the largest benchmark circuit the scheme was
// evaluated on) are tested with pseudorandom words. The reference parity is
// counted bit by bit.
module parity_tree_tb;

  logic [2:0]  o3;
  logic [0:0]  o1;
  logic [6:0]  o7;
  logic [34:0] o35;
  logic p3, p1, p7, p35;

  int checks = 0;
  int failures = 0;

  parity_tree #(.M(3))  dut3  (.o(o3),  .p(p3));
  parity_tree #(.M(1))  dut1  (.o(o1),  .p(p1));
  parity_tree #(.M(7))  dut7  (.o(o7),  .p(p7));
  parity_tree #(.M(35)) dut35 (.o(o35), .p(p35));

  function automatic logic count_parity(input logic [63:0] v, input int w);
    int ones = 0;
    for (int i = 0; i < w; i++) if (v[i]) ones++;
    return ones[0];
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      o3 = i[2:0];
      o1 = i[0:0];
      #1;
      check(p3, count_parity(64'(o3), 3), "M=3");
      check(p1, o1[0], "M=1");
    end
    for (int t = 0; t < 500; t++) begin
      o7  = 7'($urandom);
      o35 = {3'($urandom), $urandom};
      #1;
      check(p7,  count_parity(64'(o7), 7),   "M=7");
      check(p35, count_parity(64'(o35), 35), "M=35");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
