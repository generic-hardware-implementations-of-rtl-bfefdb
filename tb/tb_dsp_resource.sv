// tb_dsp_resource: random operation sequences on one DSP block model.
//
// A cycle-level reference (product register, then the 48-bit accumulator
// with its four operations, the first one adding the C port) is kept in the testbench and compared with P
// after every clock edge. Extreme multiplier operands (-2^24 * -2^17) and
// accumulator wrap-around are included.
module tb_dsp_resource;
  import amns_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  dsp_op_e            op;
  logic signed [24:0] a;
  logic signed [17:0] b;
  logic signed [47:0] c, x, y, p;

  dsp_resource dut (.clk(clk), .rst_n(rst_n), .op_i(op), .a_i(a), .b_i(b),
                    .c_i(c), .x_i(x), .y_i(y), .p_o(p));

  int checks = 0, failures = 0;
  int n_op [4] = '{0, 0, 0, 0};

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [63:0] m_ref, p_ref, m_next, p_next;
    op = DSP_HOLD; a = '0; b = '0; c = '0; x = '0; y = '0;
    m_ref = 0;
    p_ref = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      op = dsp_op_e'($urandom % 4);
      a  = (i % 50 == 7) ? -25'sd16777216 : 25'($urandom);
      b  = (i % 50 == 7) ? -18'sd131072   : 18'($urandom);
      c  = 48'({$urandom, $urandom});
      x  = 48'({$urandom, $urandom});
      y  = 48'({$urandom, $urandom});
      n_op[op]++;
      // Reference of the edge to come.
      m_next = 64'(a) * 64'(b);
      unique case (op)
        DSP_MAC_FIRST: p_next = m_ref + 64'(c);
        DSP_MAC:       p_next = p_ref + m_ref;
        DSP_ADD:       p_next = p_ref + 64'(x) + 64'(y);
        default:       p_next = p_ref;
      endcase
      p_ref = 64'(48'(p_next));
      m_ref = m_next;
      @(posedge clk);
      #1;
      checks++;
      if (p !== 48'(p_ref)) begin
        failures++;
        $display("FAIL cycle %0d op %0d: p=%0d expected %0d", i, op, p, 48'(p_ref));
      end
    end
    foreach (n_op[i]) begin
      checks++;
      if (n_op[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
