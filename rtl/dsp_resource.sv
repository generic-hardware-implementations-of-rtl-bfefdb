// dsp_resource: model of one FPGA DSP block as the multiplier uses it.
//
// A 25x18 signed multiplier feeds a product register M (one cycle), and a
// 48-bit accumulator P is updated from M or from a three-input addition:
//   DSP_MAC_FIRST : P <= M + c_i         (c_i: the C port, an addend)
//   DSP_MAC       : P <= P + M
//   DSP_ADD       : P <= P + x_i + y_i   (x_i: a neighbour's P, y_i: the
//                                         cascade input, already shifted)
//   DSP_HOLD      : P unchanged
// The port widths (25x18 multiplier, 48-bit three-input adder) are those of
// the DSP block the design targets; the operation encoding and the single
// product register are this design's choice. Timing: a/b sampled at edge n
// reach P through DSP_MAC(_FIRST) at edge n+1. P resets to zero.
module dsp_resource
  import amns_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  dsp_op_e                    op_i,
  input  logic signed [DSP_A_W-1:0]  a_i,
  input  logic signed [DSP_B_W-1:0]  b_i,
  input  logic signed [DSP_P_W-1:0]  c_i,
  input  logic signed [DSP_P_W-1:0]  x_i,
  input  logic signed [DSP_P_W-1:0]  y_i,
  output logic signed [DSP_P_W-1:0]  p_o
);

  logic signed [DSP_A_W+DSP_B_W-1:0] m_q;
  logic signed [DSP_P_W-1:0]         m_ext;

  assign m_ext = DSP_P_W'(m_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q <= '0;
      p_o <= '0;
    end else begin
      m_q <= a_i * b_i;
      unique case (op_i)
        DSP_MAC_FIRST: p_o <= m_ext + c_i;
        DSP_MAC:       p_o <= p_o + m_ext;
        DSP_ADD:       p_o <= p_o + x_i + y_i;
        default:       p_o <= p_o;
      endcase
    end
  end

endmodule
