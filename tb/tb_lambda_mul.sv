// tb_lambda_mul: operand preparation in front of the DSP A ports.
//
// For random K*17-bit operands and every combination of signed_en_i and
// lambda_mul_en_i, each 25-bit output section is compared with the section
// value worked out with integer arithmetic: the low sections as unsigned
// 17-bit numbers, the top one as signed or unsigned, times lambda when
// enabled. Two lambda values (-16 and 7) are tried, and the output must hold
// when en_i is low.
module tb_lambda_mul;

  localparam int K = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [K*17-1:0] op;
  logic            sgn, lam, en;
  logic [K*25-1:0] out_n, out_p;

  lambda_mul #(.K(K), .LAMBDA(-16)) dut_n (
    .clk(clk), .rst_n(rst_n), .en_i(en), .op_i(op), .signed_en_i(sgn),
    .lambda_mul_en_i(lam), .mul_input_a_o(out_n));
  lambda_mul #(.K(K), .LAMBDA(7)) dut_p (
    .clk(clk), .rst_n(rst_n), .en_i(en), .op_i(op), .signed_en_i(sgn),
    .lambda_mul_en_i(lam), .mul_input_a_o(out_p));

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(logic [K*25-1:0] got, int lambda, logic [K*25-1:0] prev);
    for (int i = 0; i < K; i++) begin
      longint v, e;
      v = longint'(op[i*17 +: 17]);
      if (i == K - 1 && sgn && op[i*17 + 16]) v -= 131072;
      e = lam ? v * lambda : v;
      if (!en) e = longint'($signed(prev[i*25 +: 25]));
      checks++;
      if (longint'($signed(got[i*25 +: 25])) != e) begin
        failures++;
        $display("FAIL section %0d lambda %0d sgn %0b lam %0b: got %0d expected %0d",
                 i, lambda, sgn, lam, $signed(got[i*25 +: 25]), e);
      end
    end
  endtask

  initial begin
    logic [K*25-1:0] prev_n, prev_p;
    op = '0; sgn = 0; lam = 0; en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      prev_n = out_n;
      prev_p = out_p;
      op  = (K*17)'({$urandom, $urandom, $urandom});
      if (it % 7 == 0) op[K*17-1] = 1'b1;
      sgn = it[0];
      lam = it[1];
      en  = (it % 5 != 4);
      @(posedge clk);
      #1;
      check_out(out_n, -16, prev_n);
      check_out(out_p, 7, prev_p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
