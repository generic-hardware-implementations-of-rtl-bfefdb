// amns_mult_harness: drives one amns_mult of any size with random operands
// and checks it against the big-integer reference.
//
// M has an odd constant coefficient and even other coefficients, so it is
// invertible modulo (E, 2) and M' = -M^-1 mod (E, phi) follows from Newton
// iteration. Operands are bounded by 2^(PHI_W-8) and M by 2^(17K-10), which
// keeps S within K*17 bits for any N <= 7 and |lambda| <= 16. Each
// multiplication checks all N output coefficients and the latency against EXP_LAT. done_o
// rises when NMUL multiplications are through; checks_o and failures_o count
// what was compared.
module amns_mult_harness
  import amns_pkg::*;
  import amns_ref_pkg::*;
#(
  parameter int     N      = 5,
  parameter int     K      = 4,
  parameter int     LAMBDA = 2,
  parameter model_e MODEL  = MODEL_LINE_COLUMN,
  parameter int     PHI_W  = 17 * K,
  parameter int     NMUL   = 10,
  parameter int     EXP_LAT = 40   // expected cycles from start to done
) (
  input  logic clk,
  input  logic rst_n,
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);

  localparam int COEF_W = 17 * K;

  logic start = 1'b0;
  logic [N-1:0][COEF_W-1:0] a, b, m, mp, s;
  logic busy, done;

  amns_mult #(.N(N), .K(K), .LAMBDA(LAMBDA), .MODEL(MODEL), .PHI_W(PHI_W)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start),
    .a_i(a), .b_i(b), .m_i(m), .mp_i(mp),
    .busy_o(busy), .done_o(done), .s_o(s)
  );

  function automatic big_t rnd_bits(int w);
    big_t r = '0;
    for (int i = 0; i < 4; i++) r = (r <<< 32) | big_t'($urandom);
    r = mask_w(r, w);
    return ($urandom % 2 != 0) ? -r : r;
  endfunction

  task automatic check(bit ok, string what);
    checks_o++;
    if (!ok) begin
      failures_o++;
      $display("FAIL N=%0d K=%0d lambda=%0d model=%0d: %s", N, K, LAMBDA, MODEL, what);
    end
  endtask

  initial begin
    poly_t pa, pb, pm, pmp, y0, pexp;
    bit    exact;
    int    cyc;
    done_o = 1'b0;
    checks_o = 0;
    failures_o = 0;
    pa = new[N]; pb = new[N]; pm = new[N]; y0 = new[N];
    foreach (pm[i]) begin
      pm[i] = rnd_bits(COEF_W - 10);
      if (i == 0) pm[i] = pm[i] | 1;
      else        pm[i] = pm[i] & ~big_t'(1);
      y0[i] = (i == 0) ? 1 : 0;
    end
    pmp = newton_inv(pm, y0, LAMBDA, PHI_W);
    foreach (pmp[i]) pmp[i] = mask_w(-pmp[i], PHI_W);
    for (int i = 0; i < N; i++) begin
      m[i]  = pm[i][COEF_W-1:0];
      mp[i] = pmp[i][COEF_W-1:0];
    end
    a = '0;
    b = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int it = 0; it < NMUL; it++) begin
      foreach (pa[i]) begin
        pa[i] = rnd_bits(PHI_W - 8);
        pb[i] = rnd_bits(PHI_W - 8);
        a[i]  = pa[i][COEF_W-1:0];
        b[i]  = pb[i][COEF_W-1:0];
      end
      pexp = redint(pa, pb, pm, pmp, LAMBDA, PHI_W, exact);
      check(exact, "reference division by phi not exact");
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 0;
      while (!done && cyc < 2000) begin
        @(negedge clk);
        cyc++;
      end
      check(cyc == EXP_LAT, $sformatf("latency %0d, expected %0d", cyc, EXP_LAT));
      for (int i = 0; i < N; i++)
        check(big_t'($signed(s[i])) == pexp[i],
              $sformatf("mul %0d coef %0d: got %0d expected %0d", it, i, $signed(s[i]), pexp[i]));
      @(negedge clk);
    end
    done_o = 1'b1;
  end

endmodule
