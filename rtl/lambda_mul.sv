// lambda_mul: operand preparation in front of the DSP multiplicand inputs.
//
// The K*17-bit coefficient op_i is cut into K sections of 17 bits. The low
// K-1 sections are zero-extended to 18 bits. The top section is sign-extended
// when signed_en_i is set (a signed AMNS coefficient) and zero-extended
// otherwise (an operand reduced modulo phi, which is non-negative). When
// lambda_mul_en_i is set every 18-bit section is multiplied by the small
// constant LAMBDA, which is how the factor lambda of the reduction
// X^N = lambda enters the product without an extra DSP. Each section is
// then registered as a 25-bit value (the DSP's A port); mul_input_a_o is the
// K sections side by side, section 0 in the low bits. One cycle of latency.
// Section widths, the zero/sign selection, the lambda bypass and the output
// register follow the operand-preparation circuit of the design; the port
// names are taken from it as well.
module lambda_mul
  import amns_pkg::*;
#(
  parameter int unsigned K      = 4,
  parameter int signed   LAMBDA = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en_i,            // load the output register
  input  logic [K*SEC_W-1:0]     op_i,
  input  logic                   signed_en_i,
  input  logic                   lambda_mul_en_i,
  output logic [K*DSP_A_W-1:0]   mul_input_a_o
);

  localparam logic signed [LAMBDA_W-1:0] LAMBDA_C = LAMBDA_W'(LAMBDA);

  logic signed [DSP_B_W-1:0] sec   [K];
  logic signed [DSP_A_W-1:0] sec_a [K];

  always_comb begin
    for (int i = 0; i < K; i++) begin
      if (i == K - 1 && signed_en_i)
        sec[i] = DSP_B_W'($signed(op_i[i*SEC_W +: SEC_W]));
      else
        sec[i] = $signed({1'b0, op_i[i*SEC_W +: SEC_W]});
      sec_a[i] = lambda_mul_en_i ? DSP_A_W'(sec[i] * LAMBDA_C) : DSP_A_W'(sec[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mul_input_a_o <= '0;
    else if (en_i)
      for (int i = 0; i < K; i++) mul_input_a_o[i*DSP_A_W +: DSP_A_W] <= sec_a[i];
  end

endmodule
