// tb_coef_mult_line_column: one coefficient resource, Line Column model.
//
// Two instances (K = 4 and K = 3) accumulate N = 5 products of random
// section vectors (23-bit signed A sections, as after a lambda
// pre-multiplication, 18-bit signed B sections) and recombine them. The
// result is compared with sum_t sum_ij a_i*b_j*2^(17(i+j)) computed as a big
// integer, plus a random addend given in the result format: in full, or
// its low 17K bits in short mode. The result pulse must
// come 2 + (2K-2) cycles after the last term (2 + (K-1) in short mode), and
// back-to-back sums and single-term sums are exercised.
module tb_coef_mult_line_column;
  import amns_pkg::*;

  localparam int N = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         v, first, last, short_rec;
  logic [99:0]  a4;
  logic [71:0]  b4;
  logic [149:0] r4, add4;
  logic         rv4;
  logic [74:0]  a3;
  logic [53:0]  b3;
  logic [115:0] r3, add3;
  logic         rv3;

  coef_mult_line_column #(.K(4)) dut4 (
    .clk(clk), .rst_n(rst_n), .acc_valid_i(v), .acc_first_i(first), .acc_last_i(last),
    .short_i(short_rec), .a_i(a4), .b_i(b4), .addend_i(add4), .res_o(r4), .res_valid_o(rv4));
  coef_mult_line_column #(.K(3)) dut3 (
    .clk(clk), .rst_n(rst_n), .acc_valid_i(v), .acc_first_i(first), .acc_last_i(last),
    .short_i(short_rec), .a_i(a3), .b_i(b3), .addend_i(add3), .res_o(r3), .res_valid_o(rv3));

  function automatic int steps(int k, bit s);
    return s ? k - 1 : 2 * k - 2;
  endfunction

  typedef logic signed [511:0] big_t;

  initial begin
    big_t exp4, exp3, got4, got3;
    int   nterm, c4, c3;
    v = 0; first = 0; last = 0; short_rec = 0; a4 = '0; b4 = '0; a3 = '0; b3 = '0;
    add4 = '0; add3 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 60; it++) begin
      nterm = (it % 10 == 9) ? 1 : N;
      short_rec = it[0];
      // Addend: zero on every third sum, else a random signed 130/100-bit value.
      add4 = 150'($signed(130'({$urandom, $urandom, $urandom, $urandom, $urandom})));
      add3 = 116'($signed(100'({$urandom, $urandom, $urandom, $urandom})));
      if (it % 3 == 0) begin
        add4 = '0;
        add3 = '0;
      end
      exp4 = big_t'($signed(add4));
      exp3 = big_t'($signed(add3));
      for (int t = 0; t < nterm; t++) begin
        v = 1; first = (t == 0); last = (t == nterm - 1);
        for (int i = 0; i < 4; i++) begin
          a4[i*25 +: 25] = 25'($signed(23'($urandom)));
          b4[i*18 +: 18] = 18'($urandom);
          if (it == 5) begin  // most negative operands
            a4[i*25 +: 25] = -25'sd4194304;
            b4[i*18 +: 18] = -18'sd131072;
          end
        end
        for (int i = 0; i < 3; i++) begin
          a3[i*25 +: 25] = a4[i*25 +: 25];
          b3[i*18 +: 18] = b4[i*18 +: 18];
        end
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            exp4 += (big_t'($signed(a4[i*25 +: 25])) * big_t'($signed(b4[j*18 +: 18]))) <<< (17 * (i + j));
            if (i < 3 && j < 3)
              exp3 += (big_t'($signed(a3[i*25 +: 25])) * big_t'($signed(b3[j*18 +: 18]))) <<< (17 * (i + j));
          end
        @(negedge clk);
      end
      v = 0; first = 0; last = 0;
      a4 = 100'({$urandom, $urandom, $urandom, $urandom});  // must not disturb the result
      // Count cycles from the last-term cycle to the result pulse.
      c4 = 0; c3 = 0;
      for (int c = 1; c < 40; c++) begin
        if (rv4) c4 = c;
        if (rv3) c3 = c;
        if (c4 != 0 && c3 != 0) break;
        @(negedge clk);
      end
      checks += 2;
      if (c4 != 2 + steps(4, short_rec)) begin
        failures++;
        $display("FAIL K=4 latency %0d", c4);
      end
      if (c3 != 2 + steps(3, short_rec)) begin
        failures++;
        $display("FAIL K=3 latency %0d", c3);
      end
      @(negedge clk);
      got4 = big_t'($signed(r4));
      got3 = big_t'($signed(r3));
      if (short_rec) begin
        got4 = got4 & ((big_t'(1) <<< 68) - 1);
        exp4 = exp4 & ((big_t'(1) <<< 68) - 1);
        got3 = got3 & ((big_t'(1) <<< 51) - 1);
        exp3 = exp3 & ((big_t'(1) <<< 51) - 1);
      end
      checks += 2;
      if (got4 != exp4) begin
        failures++;
        $display("FAIL K=4 it %0d: got %0h expected %0h", it, got4, exp4);
      end
      if (got3 != exp3) begin
        failures++;
        $display("FAIL K=3 it %0d: got %0h expected %0h", it, got3, exp3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
