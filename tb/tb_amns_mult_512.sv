// tb_amns_mult_512: the modular multiplier at the 512-bit size (N = 7
// coefficients of K = 5 sections, 175 DSP blocks, lambda = 2, phi = 2^85,
// Line Column model) on a real AMNS.
//
// gamma = 2^72 + 1234567, p = gamma^7 - lambda (a 505-bit modulus),
// M = X - gamma, M' = -M^-1 mod (E, phi) from Newton iteration. Operand
// coefficients stay below 2^78, which the parameters keep closed under
// multiplication. Every result is checked coefficient by coefficient against
// the big-integer reference, through the congruence
// S(gamma)*phi = A(gamma)*B(gamma) mod p, and for its latency of
// 10 + 3N + 2(2K-2) + (K-1) = 51 cycles. The same mechanisms as in the
// default-size test are counted.
module tb_amns_mult_512;
  import amns_pkg::*;
  import amns_ref_pkg::*;

  localparam int N      = 7;
  localparam int K      = 5;
  localparam int LAMBDA = 2;
  localparam int PHI_W  = 85;
  localparam int COEF_W = 17 * K;
  localparam int NMUL   = 40;
  localparam int RHO_W  = 78;   // operand coefficients: |x| < 2^RHO_W
  localparam int GAM_W  = 72;   // gamma = 2^GAM_W + GAM_ADD
  localparam int GAM_ADD = 1_234_567;
  localparam int EXP_LAT = 51;  // 10 + 3N + 2(2K-2) + (K-1)

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0][COEF_W-1:0] a, b, m, mp, s;
  logic busy, done;

  always #5 clk = ~clk;

  amns_mult #(.N(N), .K(K), .LAMBDA(LAMBDA), .PHI_W(PHI_W)) dut (
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
