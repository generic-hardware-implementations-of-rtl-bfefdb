// coef_mult_line_column: one coefficient resource, Line Column model.
//
// K*K DSP blocks multiply every pair of 17-bit sections a_i*b_j of two
// K-section integers and accumulate N such products over N cycles, so the
// resource computes a sum of products like lambda*A1*B2 + lambda*A2*B1 + A0*B0
// (the lambda factor is already in the A sections). The partial products
// are then recombined into one integer. DSPs of the same weight Y^d (d = i+j)
// form a line and are summed along it, one DSP per cycle; the last DSP of
// each line ("main") adds the line sum and the main of weight Y^(d-1),
// shifted right by 17, at recombination step d. A full recombination takes
// 2K-2 steps; in short mode (result needed modulo 2^(17K) only) it stops
// after K-1 steps.
//
// An addend in the result format (addend_i) enters through the C ports of
// the first DSP of each weight together with the first product term, so
// the resource returns addend + sum of products at no extra cost.
//
// Interface: acc_valid_i marks a cycle whose a_i/b_i carry one product term
// (acc_first_i on the first, acc_last_i on the last of the N terms); short_i
// is sampled with acc_last_i; addend_i must be held while the sum runs
// (tie it to zero for a plain sum of products). res_o is the recombined value: 17 bits from
// each of the 2K-2 low weights and the 48-bit main of the top weight. It is
// valid from the cycle in which res_valid_o pulses, 2 + steps cycles after
// the acc_last_i cycle, until the next sum starts.
//
// The line/cascade structure, the schedule for K = 3 (which this generalises)
// and the cycle counts follow the Line Column model; the ordering of DSPs
// inside a line and the handshake are this design's choice.
module coef_mult_line_column
  import amns_pkg::*;
#(
  parameter int unsigned K     = 4,
  localparam int unsigned RES_W = SEC_W * (2 * K - 2) + DSP_P_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  acc_valid_i,
  input  logic                  acc_first_i,
  input  logic                  acc_last_i,
  input  logic                  short_i,
  input  logic [K*DSP_A_W-1:0]  a_i,
  input  logic [K*DSP_B_W-1:0]  b_i,
  input  logic [RES_W-1:0]      addend_i,
  output logic [RES_W-1:0]      res_o,
  output logic                  res_valid_o
);

  localparam int unsigned NCOL    = 2 * K - 1;
  localparam int unsigned NDSP    = K * K;
  localparam int unsigned STEPS_F = recomb_steps(MODEL_LINE_COLUMN, K, 1'b0);
  localparam int unsigned STEPS_S = recomb_steps(MODEL_LINE_COLUMN, K, 1'b1);
  localparam int unsigned STEP_W  = $clog2(STEPS_F + 2);

  // Control, delayed one cycle to line up with the DSP product register.
  logic              mac_v_q, mac_first_q, mac_last_q, short_d_q, short_q;
  logic [STEP_W-1:0] step_q;
  logic [STEP_W-1:0] last_step;

  assign last_step = short_q ? STEP_W'(STEPS_S) : STEP_W'(STEPS_F);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mac_v_q     <= 1'b0;
      mac_first_q <= 1'b0;
      mac_last_q  <= 1'b0;
      short_d_q   <= 1'b0;
      short_q     <= 1'b0;
      step_q      <= '0;
      res_valid_o <= 1'b0;
    end else begin
      mac_v_q     <= acc_valid_i;
      mac_first_q <= acc_valid_i && acc_first_i;
      mac_last_q  <= acc_valid_i && acc_last_i;
      if (acc_valid_i && acc_last_i) short_d_q <= short_i;
      res_valid_o <= 1'b0;
      if (mac_v_q && mac_last_q) begin
        short_q <= short_d_q;
        if ((short_d_q ? STEPS_S : STEPS_F) == 0) res_valid_o <= 1'b1;
        else step_q <= STEP_W'(1);
      end else if (step_q != '0) begin
        if (step_q == last_step) begin
          step_q      <= '0;
          res_valid_o <= 1'b1;
        end else begin
          step_q <= step_q + 1'b1;
        end
      end
    end
  end

  logic signed [DSP_P_W-1:0] p_w [NDSP];

  for (genvar d = 0; d < NCOL; d++) begin : g_col
    localparam int unsigned NSZ  = col_size(K, d);
    localparam int unsigned BASE = col_base(K, d);
    localparam int unsigned ILO  = col_ilo(K, d);
    for (genvar p = 0; p < NSZ; p++) begin : g_dsp
      localparam int unsigned IDX   = BASE + p;
      localparam int unsigned I     = ILO + p;
      localparam int unsigned J     = d - I;
      localparam bit          MAIN  = (p == NSZ - 1);
      // Recombination step at which this DSP adds (0: never).
      localparam int unsigned MY_STEP = MAIN ? d : p;

      dsp_op_e                   op;
      logic signed [DSP_P_W-1:0] c;
      logic signed [DSP_P_W-1:0] x, y;

      if (MAIN && d > 0) begin : g_main
        assign y = p_w[col_main(K, d - 1)] >>> SEC_W;
        if (NSZ > 1) begin : g_x
          assign x = p_w[IDX - 1];
        end else begin : g_nox
          assign x = '0;
        end
      end else if (p > 0) begin : g_line
        assign x = p_w[IDX - 1];
        assign y = '0;
      end else begin : g_first
        assign x = '0;
        assign y = '0;
      end

      // The first DSP of each weight takes that weight's part of the addend
      // on its C port: 17 unsigned bits, or the signed top part.
      if (p == 0 && d == NCOL - 1) begin : g_c_top
        assign c = $signed(addend_i[RES_W-1 -: DSP_P_W]);
      end else if (p == 0) begin : g_c
        assign c = DSP_P_W'(addend_i[d*SEC_W +: SEC_W]);
      end else begin : g_noc
        assign c = '0;
      end

      always_comb begin
        if (mac_v_q)
          op = mac_first_q ? DSP_MAC_FIRST : DSP_MAC;
        else if (MY_STEP != 0 && step_q == STEP_W'(MY_STEP))
          op = DSP_ADD;
        else
          op = DSP_HOLD;
      end

      dsp_resource u_dsp (
        .clk   (clk),
        .rst_n (rst_n),
        .op_i  (op),
        .a_i   (a_i[I*DSP_A_W +: DSP_A_W]),
        .b_i   (b_i[J*DSP_B_W +: DSP_B_W]),
        .c_i   (c),
        .x_i   (x),
        .y_i   (y),
        .p_o   (p_w[IDX])
      );
    end
  end

  // Result assembly: low 17 bits of every main below the top weight, then
  // the whole 48-bit main of the top weight.
  always_comb begin
    for (int d = 0; d < NCOL - 1; d++)
      res_o[d*SEC_W +: SEC_W] = p_w[col_main(K, d)][SEC_W-1:0];
    res_o[RES_W-1 -: DSP_P_W] = p_w[col_main(K, NCOL - 1)];
  end

endmodule
