// ppsc_top_tb -- end-to-end test and coverage measurement of the partially
// self-checking example circuit, at its default (and only) size.
//
// 1. Fault free, all 16 inputs: outputs must match their equations, E1 must
//    equal E2 (no false alarm) and both must equal PP & cf.
// 2. Exhaustive fault run: each of the 10 internal single stuck-at faults of
//    the function logic on each of the 16 inputs. A reference computed here
//    gives the faulty outputs; an output error of odd multiplicity is what
//    full parity prediction would detect, and the partial scheme must flag
//    (E1 != E2) exactly those odd errors that occur while cf = A' + C' = 1.
//    Per fault, the sensitization probability SP_parity (odd-error patterns
//    over all patterns) and the undetected share Delta_SP are binned into the
//    eight intervals [k/8, (k+1)/8].
// 3. Pseudorandom run: 32,000 random input patterns, every fault injected on
//    every pattern, as in the coverage measurement of the scheme. Coverage =
//    errors detected by the partial scheme / errors detectable by parity.
//    It must agree with the exact figure of step 2 to within 2 points.
// Every mechanism of the scheme is counted and must occur at least once:
// checking disabled (cf = 0), error detected, odd error missed because
// checking was disabled, even-multiplicity error missed by parity.
module ppsc_top_tb;
  import ppsc_pkg::*;

  localparam int N_PATTERNS = 32000;

  ex_in_t           x;
  stuck_at_t        fault;
  logic [N_OUT-1:0] o;
  logic             e1, e2;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_disabled = 0;        // patterns with checking disabled
  int n_detected = 0;        // errors flagged by E1 != E2
  int n_miss_disabled = 0;   // odd errors missed while checking was off
  int n_miss_even = 0;       // even errors (invisible to any parity check)

  ppsc_top dut (.x(x), .fault(fault), .o(o), .e1(e1), .e2(e2));

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

  function automatic logic cf_ref(input ex_in_t v);
    return !(v.a && v.c);
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Apply one (input, fault) pair, check the DUT and return what happened.
  task automatic apply(input ex_in_t v, input stuck_at_t f,
                       output bit odd_err, output bit detected);
    logic [2:0] good, bad, err;
    x     = v;
    fault = f;
    #1;
    good = ref_out(v, FAULT_NONE);
    bad  = ref_out(v, f);
    err  = good ^ bad;
    odd_err  = ^err;
    detected = (e1 != e2);
    checks++;
    if (o !== bad) fail($sformatf("outputs x=%b fault=%p o=%b exp=%b", v, f, o, bad));
    checks++;
    if (detected != (odd_err && cf_ref(v)))
      fail($sformatf("detection x=%b fault=%p e1=%b e2=%b err=%b", v, f, e1, e2, err));
    checks++;
    if (e2 !== (pp_ref(v) & cf_ref(v))) fail($sformatf("e2 x=%b", v));
    if (!cf_ref(v)) n_disabled++;
    if (detected) n_detected++;
    if (odd_err && !cf_ref(v)) n_miss_disabled++;
    if (err != 3'b000 && !odd_err) n_miss_even++;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit odd_err, detected;
    int sp_par [2*N_NODES];
    int sp_ppp [2*N_NODES];
    int bin_par [8];
    int bin_delta [8];
    int ex_parity_errs, ex_partial_errs;
    int rnd_parity_errs, rnd_partial_errs;
    real cov_exact, cov_rnd;
    stuck_at_t f;

    // 1. fault free
    for (int i = 0; i < 16; i++) begin
      apply(ex_in_t'(i[3:0]), FAULT_NONE, odd_err, detected);
      checks++;
      if (e1 !== e2 || e1 !== (pp_ref(x) & cf_ref(x)))
        fail($sformatf("fault-free x=%b e1=%b e2=%b", x, e1, e2));
    end

    // 2. exhaustive fault run, sensitization probabilities
    ex_parity_errs = 0;
    ex_partial_errs = 0;
    foreach (bin_par[k]) begin bin_par[k] = 0; bin_delta[k] = 0; end
    for (int k = 0; k < 2 * N_NODES; k++) begin
      f = '{en: 1'b1, node: node_e'(k / 2), value: k[0]};
      sp_par[k] = 0;
      sp_ppp[k] = 0;
      for (int i = 0; i < 16; i++) begin
        apply(ex_in_t'(i[3:0]), f, odd_err, detected);
        if (odd_err) sp_par[k]++;
        if (detected) sp_ppp[k]++;
      end
      ex_parity_errs  += sp_par[k];
      ex_partial_errs += sp_ppp[k];
      checks++;
      if (sp_ppp[k] > sp_par[k]) fail($sformatf("SP_partial > SP_parity for fault %0d", k));
      // interval index of a probability p = cnt/16 in eight bins of 1/8
      bin_par[(sp_par[k] * 8 / 16 > 7) ? 7 : sp_par[k] * 8 / 16]++;
      bin_delta[((sp_par[k] - sp_ppp[k]) * 8 / 16 > 7) ? 7 : (sp_par[k] - sp_ppp[k]) * 8 / 16]++;
      $display("fault N%0d/sa%0d: SP_parity=%0d/16 SP_partial=%0d/16 Delta=%0d/16",
               k / 2 + 1, k % 2, sp_par[k], sp_ppp[k], sp_par[k] - sp_ppp[k]);
    end
    cov_exact = 100.0 * ex_partial_errs / ex_parity_errs;
    $display("exhaustive: parity-detectable errors=%0d partial-detected=%0d coverage=%0.1f%%",
             ex_parity_errs, ex_partial_errs, cov_exact);
    $write("SP distribution (SP_parity -> Delta_SP):");
    for (int k = 0; k < 8; k++) $write(" %0d->%0d", bin_par[k], bin_delta[k]);
    $write("\n");
    // Figures worked out separately for this netlist: 48 parity-detectable
    // (fault, input) pairs, 36 of them with cf = 1 (coverage 75%).
    checks++;
    if (ex_parity_errs != 48 || ex_partial_errs != 36)
      fail($sformatf("exhaustive counts %0d/%0d, expected 48/36", ex_parity_errs, ex_partial_errs));

    // 3. pseudorandom patterns
    rnd_parity_errs = 0;
    rnd_partial_errs = 0;
    for (int p = 0; p < N_PATTERNS; p++) begin
      ex_in_t v;
      v = ex_in_t'($urandom_range(15, 0));
      for (int k = 0; k < 2 * N_NODES; k++) begin
        f = '{en: 1'b1, node: node_e'(k / 2), value: k[0]};
        apply(v, f, odd_err, detected);
        if (odd_err) rnd_parity_errs++;
        if (detected) rnd_partial_errs++;
      end
    end
    cov_rnd = 100.0 * rnd_partial_errs / rnd_parity_errs;
    $display("%0d random patterns: parity-detectable errors=%0d partial-detected=%0d coverage=%0.1f%%",
             N_PATTERNS, rnd_parity_errs, rnd_partial_errs, cov_rnd);
    checks++;
    if (cov_rnd < cov_exact - 2.0 || cov_rnd > cov_exact + 2.0)
      fail($sformatf("random coverage %0.1f far from exact %0.1f", cov_rnd, cov_exact));

    // every mechanism must have been exercised
    $display("mechanisms: disabled=%0d detected=%0d missed_disabled=%0d missed_even=%0d",
             n_disabled, n_detected, n_miss_disabled, n_miss_even);
    checks++; if (n_disabled == 0)      fail("checking was never disabled");
    checks++; if (n_detected == 0)      fail("no error was ever detected");
    checks++; if (n_miss_disabled == 0) fail("no odd error fell in the disabled space");
    checks++; if (n_miss_even == 0)     fail("no even-multiplicity error occurred");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
