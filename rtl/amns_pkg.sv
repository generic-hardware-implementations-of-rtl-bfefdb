// amns_pkg: constants, types and cycle-count functions shared by the AMNS
// (Adapted Modular Number System) multiplier.
//
// The datapath is built from FPGA-style DSP blocks: a 25x18 signed multiplier
// followed by a three-input 48-bit adder. Integer coefficients are cut into
// 17-bit sections so that every section, widened by one sign bit, fills the
// 18-bit multiplier input. Those widths are the ones of the target DSP block;
// the enumerations and the latency helpers below are this design's own way of
// naming the two recombination models and their cycle counts.
package amns_pkg;

  // Width of one integer section (17 bits + 1 sign/zero bit = 18-bit DSP port).
  localparam int unsigned SEC_W   = 17;
  // DSP block port widths: multiplicand A, multiplier B, accumulator P.
  localparam int unsigned DSP_A_W = 25;
  localparam int unsigned DSP_B_W = 18;
  localparam int unsigned DSP_P_W = 48;
  // Width of the lambda constant: |lambda| <= 16 needs 6 signed bits.
  localparam int unsigned LAMBDA_W = 6;

  // How the K*K partial products of one coefficient are recombined.
  typedef enum logic {
    MODEL_COLUMN      = 1'b0,  // one cascade through all K*K DSPs
    MODEL_LINE_COLUMN = 1'b1   // one line per Y-power, cascade between lines
  } model_e;

  // Per-cycle operation of one DSP block.
  typedef enum logic [1:0] {
    DSP_HOLD      = 2'd0,  // keep P
    DSP_MAC_FIRST = 2'd1,  // P = M + C       (first term of a sum)
    DSP_MAC       = 2'd2,  // P = P + M       (further terms)
    DSP_ADD       = 2'd3   // P = P + X + Y   (recombination step)
  } dsp_op_e;

  // Which polynomial product of the modular multiplication is running.
  typedef enum logic [1:0] {
    PASS_AB  = 2'd0,  // C = A*B mod E
    PASS_CMP = 2'd1,  // Q = C*M' mod (E, phi)
    PASS_QM  = 2'd2   // T = Q*M mod E
  } pass_e;

  // Recombination steps after the last multiply-accumulate. A "short"
  // recombination only produces the low K sections (the result is needed
  // modulo phi = 2^(17K) only).
  function automatic int unsigned recomb_steps(model_e model, int unsigned k, bit short_rec);
    if (model == MODEL_COLUMN)
      return short_rec ? (k * (k + 1)) / 2 - 1 : k * k - 1;
    else
      return short_rec ? k - 1 : 2 * k - 2;
  endfunction

  // Latency of one product of polynomials (external reduction only):
  // N accumulation cycles followed by the recombination steps.
  function automatic int unsigned ext_latency(model_e model, int unsigned n, int unsigned k);
    return n + recomb_steps(model, k, 1'b0);
  endfunction

  // Latency of a full modular multiplication with internal reduction:
  // 10 bubble cycles, three products of N cycles each, two full and one
  // short recombination.
  function automatic int unsigned amns_latency(model_e model, int unsigned n, int unsigned k);
    return 10 + 3 * n + 2 * recomb_steps(model, k, 1'b0) + recomb_steps(model, k, 1'b1);
  endfunction

  // Indexing of the K*K partial products a_i*b_j of one coefficient.
  // They are grouped by weight Y^d (d = i + j, 0 <= d <= 2K-2), and inside a
  // group ordered by ascending i. col_size(d) products have weight Y^d,
  // col_base(d) is the index of the first of them, col_ilo(d) its i.
  function automatic int unsigned col_size(int unsigned k, int unsigned d);
    return (d + 1 < 2 * k - 1 - d) ? d + 1 : 2 * k - 1 - d;
  endfunction

  function automatic int unsigned col_base(int unsigned k, int unsigned d);
    int unsigned b = 0;
    for (int unsigned e = 0; e < d; e++) b += col_size(k, e);
    return b;
  endfunction

  function automatic int unsigned col_ilo(int unsigned k, int unsigned d);
    return (d > k - 1) ? d - k + 1 : 0;
  endfunction

  // Index of the DSP that carries the recombined value of weight Y^d.
  function automatic int unsigned col_main(int unsigned k, int unsigned d);
    return col_base(k, d) + col_size(k, d) - 1;
  endfunction

endpackage
