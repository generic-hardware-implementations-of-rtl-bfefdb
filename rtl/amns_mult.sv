// amns_mult: AMNS modular multiplier with internal (Montgomery-like) reduction.
//
// An integer modulo p is held as a polynomial of N signed coefficients in
// the Adapted Modular Number System. Multiplying two such polynomials needs
// two reductions. The external reduction folds degrees >= N back with
// X^N = lambda (E = X^N - lambda, |lambda| <= 16). The internal reduction
// shrinks the coefficients again, Montgomery style, with phi = 2^PHI_W and
// polynomials M, M' satisfying M*M' = -1 mod (E, phi):
//   C = A*B mod E;  Q = C*M' mod (E, phi);  S = (C + Q*M mod E) / phi
// All three products run on one bank of N coefficient resources
// (amns_ext_mult), each built from K*K DSP blocks that work on 17-bit
// sections of K*17-bit coefficients. amns_ctrl sequences the products; this
// module holds the operand and intermediate registers and selects each
// product's operands. C is added inside the DSPs during the Q*M product
// (through their C ports), so S is that product's result shifted right by
// PHI_W and truncated, loaded into the output register.
//
// Interface: a_i, b_i are the operands, coefficient j in a_i[j], each a
// K*17-bit two's-complement number; m_i (signed) and mp_i (taken modulo
// phi) are the reduction polynomials and must be stable while busy_o is
// high. start_i (when idle) samples a_i and b_i. done_o pulses when s_o
// holds S; s_o keeps it until the next done_o. S is truncated to K*17 bits,
// which is exact when the AMNS parameters bound the coefficients (the usual
// condition rho > 2*N*|lambda|*max|M_i| and N*|lambda|*rho^2 < phi*rho/2).
// Two assertions flag parameters that break these rules: a sum C + Q*M that
// is not a multiple of phi (wrong M') and an S that does not fit.
// Latency: 10 + 3N + 2*(2K-2) + (K-1) cycles for the Line Column model,
// 10 + 3N + 2*(K*K-1) + K(K+1)/2 - 1 for the Column model.
//
// Defaults N = 5, K = 4 are the 256-bit configuration of the design (80 DSP
// blocks, 40 cycles with the Line Column model). LAMBDA and PHI_W = 17K are
// this design's choices: the value of lambda is left to the chosen AMNS,
// and phi = 2^(17K) is what a recombination that keeps exactly K sections
// gives.
module amns_mult
  import amns_pkg::*;
#(
  parameter int unsigned N      = 5,
  parameter int unsigned K      = 4,
  parameter int signed   LAMBDA = 2,
  parameter model_e      MODEL  = MODEL_LINE_COLUMN,
  parameter int unsigned PHI_W  = SEC_W * K,
  localparam int unsigned COEF_W = SEC_W * K,
  localparam int unsigned RES_W  = SEC_W * (2 * K - 2) + DSP_P_W,
  localparam int unsigned T_W    = (N > 1) ? $clog2(N) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start_i,
  input  logic [N-1:0][COEF_W-1:0]  a_i,
  input  logic [N-1:0][COEF_W-1:0]  b_i,
  input  logic [N-1:0][COEF_W-1:0]  m_i,
  input  logic [N-1:0][COEF_W-1:0]  mp_i,
  output logic                      busy_o,
  output logic                      done_o,
  output logic [N-1:0][COEF_W-1:0]  s_o
);

  if (PHI_W > COEF_W || PHI_W == 0) begin : g_bad_phi
    $error("PHI_W must be between 1 and 17*K");
  end

  localparam logic [COEF_W-1:0] PHI_MASK = COEF_W'((COEF_W+1)'(1) << PHI_W) - 1'b1;

  logic           load, issue, first, last, short_rec, cap, fin, res_valid;
  logic [T_W-1:0] term;
  pass_e          pass;

  amns_ctrl #(.N(N)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start_i     (start_i),
    .res_valid_i (res_valid),
    .busy_o      (busy_o),
    .load_o      (load),
    .issue_o     (issue),
    .first_o     (first),
    .last_o      (last),
    .term_o      (term),
    .pass_o      (pass),
    .short_o     (short_rec),
    .cap_o       (cap),
    .final_o     (fin),
    .done_o      (done_o)
  );

  logic [N-1:0][COEF_W-1:0] a_q, b_q, q_q;
  logic [N-1:0][RES_W-1:0]  c_q, u_q, res, addend;
  logic [N-1:0][COEF_W-1:0] opa, opb;
  logic                     signed_a, signed_b;

  // Operand selection per product.
  always_comb begin
    for (int j = 0; j < N; j++) begin
      unique case (pass)
        PASS_AB: begin
          opa[j] = a_q[j];
          opb[j] = b_q[j];
        end
        PASS_CMP: begin
          opa[j] = c_q[j][COEF_W-1:0] & PHI_MASK;
          opb[j] = mp_i[j] & PHI_MASK;
        end
        default: begin  // PASS_QM
          opa[j] = q_q[j];
          opb[j] = m_i[j];
        end
      endcase
    end
    // C enters the Q*M product through the DSP C ports: U = C + Q*M mod E.
    addend   = (pass == PASS_QM) ? c_q : '0;
    signed_a = (pass == PASS_AB);
    signed_b = (pass != PASS_CMP);
  end

  amns_ext_mult #(.N(N), .K(K), .LAMBDA(LAMBDA), .MODEL(MODEL)) u_ext (
    .clk         (clk),
    .rst_n       (rst_n),
    .issue_i     (issue),
    .first_i     (first),
    .last_i      (last),
    .term_i      (term),
    .short_i     (short_rec),
    .signed_a_i  (signed_a),
    .signed_b_i  (signed_b),
    .opa_i       (opa),
    .opb_i       (opb),
    .addend_i    (addend),
    .res_o       (res),
    .res_valid_o (res_valid)
  );

  // Final step: S_j = U_j / phi. The division is exact because
  // C + Q*M = 0 mod (E, phi), so an arithmetic shift does it.
  logic signed [RES_W-1:0] u_s [N];
  always_comb
    for (int j = 0; j < N; j++) u_s[j] = $signed(u_q[j]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      c_q <= '0;
      q_q <= '0;
      u_q <= '0;
      s_o <= '0;
    end else begin
      if (load) begin
        a_q <= a_i;
        b_q <= b_i;
      end
      if (cap) begin
        unique case (pass)
          PASS_AB:  c_q <= res;
          PASS_CMP: for (int j = 0; j < N; j++) q_q[j] <= res[j][COEF_W-1:0] & PHI_MASK;
          default:  u_q <= res;
        endcase
      end
      if (fin)
        for (int j = 0; j < N; j++) s_o[j] <= COEF_W'(u_s[j] >>> PHI_W);
    end
  end

  // Rules the AMNS parameters must satisfy: U is a multiple of phi
  // (M*M' = -1 mod (E, phi)) and S fits in K*17 bits (coefficient bound).
  always_ff @(posedge clk)
    if (rst_n && fin)
      for (int j = 0; j < N; j++) begin
        a_exact: assert (u_q[j][PHI_W-1:0] == '0)
          else $error("coefficient %0d: C + Q*M not divisible by phi, check M'", j);
        a_fits: assert (&u_q[j][RES_W-1:PHI_W+COEF_W-1] || ~|u_q[j][RES_W-1:PHI_W+COEF_W-1])
          else $error("coefficient %0d: S exceeds %0d bits", j, COEF_W);
      end

endmodule
