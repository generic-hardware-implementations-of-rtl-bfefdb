// tb_amns_mult: end-to-end test of the AMNS modular multiplier at its
// default size (N = 5 coefficients of K = 4 sections, lambda = 2,
// phi = 2^68, Line Column model).
//
// The AMNS is built here: gamma is an odd 51-bit number, p = gamma^5 - lambda
// (a 255-bit modulus with gamma^N = lambda mod p), M = X - gamma (so
// M(gamma) = 0 mod p) and M' = -M^-1 mod (E, phi) from Newton iteration.
// Each multiplication is checked three ways: every output coefficient
// against the big-integer reference, the integer it represents
// (S(gamma)*phi = A(gamma)*B(gamma) mod p), and the latency
// 10 + 3N + 2(2K-2) + (K-1) = 40 cycles. Results are fed back as operands so
// that chains of multiplications stay inside the representation. The test
// also counts the mechanisms the datapath relies on: lambda-weighted terms,
// short (mod phi) recombinations, Q coefficients whose top bit is set
// (Q is non-negative, so its top section must be zero-extended), negative coefficients, and a start request
// while busy (it must be ignored).
module tb_amns_mult;
  import amns_pkg::*;
  import amns_ref_pkg::*;

  localparam int N      = 5;
  localparam int K      = 4;
  localparam int LAMBDA = 2;
  localparam int PHI_W  = 68;
  localparam int COEF_W = 17 * K;
  localparam int NMUL   = 40;
  localparam int RHO_W  = 59;   // operand coefficients: |x| < 2^RHO_W
  localparam int GAM_W  = 50;   // gamma = 2^GAM_W + GAM_ADD
  localparam int GAM_ADD = 24_691;
  localparam int EXP_LAT = 40;  // 10 + 3N + 2(2K-2) + (K-1)

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0][COEF_W-1:0] a, b, m, mp, s;
  logic busy, done;

  always #5 clk = ~clk;

  amns_mult dut (
    .clk(clk), .rst_n(rst_n), .start_i(start),
    .a_i(a), .b_i(b), .m_i(m), .mp_i(mp),
    .busy_o(busy), .done_o(done), .s_o(s)
  );

  int checks = 0, failures = 0;
  int n_lambda = 0, n_short = 0, n_unsigned_top = 0, n_neg = 0, n_busy_start = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Mechanism counters, from the datapath's own control signals.
  always @(posedge clk) begin
    if (dut.issue && dut.term != 0) n_lambda++;
    if (dut.cap && dut.short_rec) n_short++;
    if (dut.issue && dut.pass == PASS_QM && dut.opa[dut.term][COEF_W-1]) n_unsigned_top++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic big_t rnd_rho();
    big_t r = '0;
    for (int i = 0; i < 4; i++) r = (r <<< 32) | big_t'($urandom);
    r = mask_w(r, RHO_W);
    return ($urandom % 2 != 0) ? -r : r;
  endfunction

  initial begin
    big_t  gamma, p, phi_mod;
    poly_t pa, pb, pm, pmp, y0, ps, pexp, pchk;
    bit    exact;
    int    cyc;

    gamma   = (big_t'(1) <<< GAM_W) + big_t'(GAM_ADD);
    p       = 1;
    for (int i = 0; i < N; i++) p = p * gamma;
    p       = p - big_t'(LAMBDA);
    phi_mod = (big_t'(1) <<< PHI_W) % p;

    pm = new[N]; y0 = new[N]; pa = new[N]; pb = new[N]; ps = new[N];
    foreach (pm[i]) begin pm[i] = '0; y0[i] = 1; end
    pm[0] = -gamma;
    pm[1] = 1;
    pmp = newton_inv(pm, y0, LAMBDA, PHI_W);
    foreach (pmp[i]) pmp[i] = mask_w(-pmp[i], PHI_W);
    // Self-check of the reference: M*M' = -1 mod (E, phi).
    pchk = mask_pow2(polymul(pm, pmp, LAMBDA), PHI_W);
    if (pchk[0] != mask_w(-1, PHI_W)) $fatal(1, "bad M'");
    for (int i = 0; i < N; i++) begin
      m[i]  = pm[i][COEF_W-1:0];
      mp[i] = pmp[i][COEF_W-1:0];
      a[i]  = '0;
      b[i]  = '0;
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    for (int it = 0; it < NMUL; it++) begin
      // Operands: random, extreme, or the previous result (chaining).
      foreach (pb[i]) pb[i] = rnd_rho();
      if (it == 0 || it % 4 != 0) foreach (pa[i]) pa[i] = rnd_rho();
      else foreach (pa[i]) pa[i] = ps[i];
      if (it == 1) foreach (pa[i]) begin pa[i] = -((big_t'(1) <<< RHO_W) - 1); pb[i] = pa[i]; end
      if (it == 2) foreach (pa[i]) begin pa[i] = (big_t'(1) <<< RHO_W) - 1; pb[i] = -pa[i]; end
      for (int i = 0; i < N; i++) begin
        a[i] = pa[i][COEF_W-1:0];
        b[i] = pb[i][COEF_W-1:0];
      end
      pexp = redint(pa, pb, pm, pmp, LAMBDA, PHI_W, exact);
      check(exact, "reference division by phi not exact");

      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 0;  // edges after the start edge seen so far
      a = '0;  // operands are sampled on the start edge only
      while (!done) begin
        if (it == 3 && cyc == 6) begin
          start = 1'b1;  // ignored while busy
          n_busy_start++;
        end else start = 1'b0;
        @(negedge clk);
        cyc++;
        if (cyc > 1000) break;
      end
      start = 1'b0;
      check(cyc == EXP_LAT, $sformatf("latency %0d, expected %0d", cyc, EXP_LAT));
      for (int i = 0; i < N; i++) begin
        ps[i] = big_t'($signed(s[i]));
        if (ps[i] < 0) n_neg++;
        check(ps[i] == pexp[i], $sformatf("mul %0d coef %0d: got %0d expected %0d",
                                          it, i, ps[i], pexp[i]));
      end
      // The represented integers: S(gamma) * phi = A(gamma) * B(gamma) mod p.
      check((eval_mod(ps, gamma, p) * phi_mod) % p ==
            (eval_mod(pa, gamma, p) * eval_mod(pb, gamma, p)) % p,
            $sformatf("mul %0d: AMNS congruence", it));
      repeat (2) @(negedge clk);
      check(!busy, "busy after done");
    end

    $display("mechanisms: lambda terms %0d, short recombinations %0d, unsigned top bits %0d, negative coefs %0d, start while busy %0d",
             n_lambda, n_short, n_unsigned_top, n_neg, n_busy_start);
    check(n_lambda > 0, "no lambda-weighted term");
    check(n_short == NMUL, "short recombination count");
    check(n_unsigned_top > 0, "no Q coefficient with top bit set");
    check(n_neg > 0, "no negative result coefficient");
    check(n_busy_start > 0, "no start while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
