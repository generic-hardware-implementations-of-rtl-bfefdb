// amns_ext_mult: product of two AMNS polynomials modulo E = X^N - lambda.
//
// With the external reduction folded in, coefficient j of A*B mod E is
//   C_j = sum_{t=0..N-1} w(t,j) * A_t * B_{(j-t) mod N},  w = lambda if t > j
// (terms that wrap past X^N come back multiplied by lambda). N coefficient
// resources compute all C_j in parallel. In issue cycle t every resource
// receives the same A_t and its own B_{(j-t) mod N}; resource j enables the
// lambda pre-multiplier when t > j. After N issue cycles each resource
// recombines its partial products (Column or Line Column model, selected by
// MODEL).
//
// Resource j adds addend_i[j] (result format) to its sum; it must be held
// stable while the product runs.
//
// Interface: the caller pulses issue_i for N consecutive cycles with term_i
// = 0..N-1 (first_i with term 0, last_i with term N-1) and keeps opa_i,
// opb_i, signed_a_i, signed_b_i and short_i stable meanwhile. signed_*_i
// select a signed (AMNS coefficient) or non-negative (value mod phi) top
// section. res_o[j] is C_j (see the resource for its format; in short mode
// only its low K*17 bits are meaningful). res_valid_o pulses
// 3 + recombination steps cycles after the last issue cycle, so one product
// takes N + steps cycles of work plus three register stages: operand
// preparation, product register and result use.
//
// The parallel resources, the broadcast/rotate operand schedule and the
// lambda handling follow the design's external-reduction scheme; the issue
// handshake is this design's choice.
module amns_ext_mult
  import amns_pkg::*;
#(
  parameter int unsigned N      = 5,
  parameter int unsigned K      = 4,
  parameter int signed   LAMBDA = 2,
  parameter model_e      MODEL  = MODEL_LINE_COLUMN,
  localparam int unsigned COEF_W = SEC_W * K,
  localparam int unsigned RES_W  = SEC_W * (2 * K - 2) + DSP_P_W,
  localparam int unsigned T_W    = (N > 1) ? $clog2(N) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        issue_i,
  input  logic                        first_i,
  input  logic                        last_i,
  input  logic [T_W-1:0]              term_i,
  input  logic                        short_i,
  input  logic                        signed_a_i,
  input  logic                        signed_b_i,
  input  logic [N-1:0][COEF_W-1:0]    opa_i,
  input  logic [N-1:0][COEF_W-1:0]    opb_i,
  input  logic [N-1:0][RES_W-1:0]     addend_i,
  output logic [N-1:0][RES_W-1:0]     res_o,
  output logic                        res_valid_o
);

  // Issue controls, delayed to line up with the registered DSP operands.
  logic issue_q, first_q, last_q, short_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issue_q <= 1'b0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
      short_q <= 1'b0;
    end else begin
      issue_q <= issue_i;
      first_q <= first_i;
      last_q  <= last_i;
      short_q <= short_i;
    end
  end

  // A_t is broadcast to every resource.
  logic [COEF_W-1:0] a_sel;
  assign a_sel = opa_i[term_i];

  logic [N-1:0] res_valid;

  for (genvar j = 0; j < N; j++) begin : g_res
    logic [T_W-1:0]          b_idx;
    logic [COEF_W-1:0]       b_sel;
    logic [K*DSP_A_W-1:0]    a_dsp;
    logic [K*DSP_B_W-1:0]    b_dsp;
    logic                    lam_en;

    // lambda applies to the terms that wrapped past X^N: t > j.
    always_comb begin
      lam_en = 1'b0;
      for (int t = j + 1; t < N; t++)
        if (term_i == T_W'(t)) lam_en = 1'b1;
    end

    // B_{(j - t) mod N}
    assign b_idx = T_W'((int'(j) + int'(N) - int'(term_i)) % int'(N));
    assign b_sel = opb_i[b_idx];

    lambda_mul #(.K(K), .LAMBDA(LAMBDA)) u_lambda (
      .clk             (clk),
      .rst_n           (rst_n),
      .en_i            (issue_i),
      .op_i            (a_sel),
      .signed_en_i     (signed_a_i),
      .lambda_mul_en_i (lam_en),
      .mul_input_a_o   (a_dsp)
    );

    // B sections: zero-extended, top one sign-extended for signed operands.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) b_dsp <= '0;
      else if (issue_i)
        for (int i = 0; i < K; i++)
          b_dsp[i*DSP_B_W +: DSP_B_W] <= (i == K - 1 && signed_b_i)
              ? DSP_B_W'($signed(b_sel[i*SEC_W +: SEC_W]))
              : {1'b0, b_sel[i*SEC_W +: SEC_W]};
    end

    if (MODEL == MODEL_COLUMN) begin : g_col
      coef_mult_column #(.K(K)) u_coef (
        .clk         (clk),
        .rst_n       (rst_n),
        .acc_valid_i (issue_q),
        .acc_first_i (first_q),
        .acc_last_i  (last_q),
        .short_i     (short_q),
        .a_i         (a_dsp),
        .b_i         (b_dsp),
        .addend_i    (addend_i[j]),
        .res_o       (res_o[j]),
        .res_valid_o (res_valid[j])
      );
    end else begin : g_line
      coef_mult_line_column #(.K(K)) u_coef (
        .clk         (clk),
        .rst_n       (rst_n),
        .acc_valid_i (issue_q),
        .acc_first_i (first_q),
        .acc_last_i  (last_q),
        .short_i     (short_q),
        .a_i         (a_dsp),
        .b_i         (b_dsp),
        .addend_i    (addend_i[j]),
        .res_o       (res_o[j]),
        .res_valid_o (res_valid[j])
      );
    end
  end

  // All resources run in lock step.
  assign res_valid_o = &res_valid;

endmodule
