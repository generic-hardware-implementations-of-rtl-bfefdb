// tb_amns_ext_mult: the bank of N coefficient resources, i.e. a product of
// polynomials modulo E = X^N - lambda.
//
// Two instances (N=5, K=4, lambda=-16, Line Column model, and N=3, K=3,
// lambda=7, Column model) receive the issue sequence the controller would
// send. Their results are compared with the big-integer product mod E for
// signed operands (full recombination) and for non-negative operands taken
// mod 2^(17K) (short recombination, low 17K bits compared). The result pulse
// must come 3 + recombination steps cycles after the last issue cycle.
// Some products also carry an addend per coefficient.
module tb_amns_ext_mult;
  import amns_pkg::*;
  import amns_ref_pkg::*;

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

  logic       issue, first, last, short_rec, sa, sb;
  logic [2:0] term;
  logic [4:0][67:0]  opa5, opb5;
  logic [4:0][149:0] res5, add5;
  logic [2:0][50:0]  opa3, opb3;
  logic [2:0][115:0] res3, add3;
  logic rv5, rv3;

  amns_ext_mult #(.N(5), .K(4), .LAMBDA(-16), .MODEL(MODEL_LINE_COLUMN)) dut5 (
    .clk(clk), .rst_n(rst_n), .issue_i(issue), .first_i(first), .last_i(last),
    .term_i(term), .short_i(short_rec), .signed_a_i(sa), .signed_b_i(sb),
    .opa_i(opa5), .opb_i(opb5), .addend_i(add5), .res_o(res5), .res_valid_o(rv5));
  amns_ext_mult #(.N(3), .K(3), .LAMBDA(7), .MODEL(MODEL_COLUMN)) dut3 (
    .clk(clk), .rst_n(rst_n), .issue_i(issue && term < 3), .first_i(first),
    .last_i(term == 2 && issue), .term_i(term[1:0]), .short_i(short_rec),
    .signed_a_i(sa), .signed_b_i(sb),
    .opa_i(opa3), .opb_i(opb3), .addend_i(add3), .res_o(res3), .res_valid_o(rv3));

  function automatic big_t rnd(int w, bit sgn);
    big_t r = '0;
    for (int i = 0; i < 3; i++) r = (r <<< 32) | big_t'($urandom);
    r = mask_w(r, w);
    if (sgn) r = r - (big_t'(1) <<< (w - 1));
    return r;
  endfunction

  task automatic cmp(big_t got, big_t exp, int w, string what);
    checks++;
    if (w > 0) begin
      got = mask_w(got, w);
      exp = mask_w(exp, w);
    end
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    poly_t a5, b5, a3, b3, c5, c3;
    int    c_5, c_3;
    bit    seen3;
    issue = 0; first = 0; last = 0; short_rec = 0; sa = 0; sb = 0; term = '0;
    opa5 = '0; opb5 = '0; opa3 = '0; opb3 = '0; add5 = '0; add3 = '0;
    a5 = new[5]; b5 = new[5]; a3 = new[3]; b3 = new[3];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 40; it++) begin
      short_rec = it[0];
      sa = !short_rec;
      sb = !short_rec;
      foreach (a5[i]) begin
        a5[i] = rnd(68, sa);
        b5[i] = rnd(68, sb);
        opa5[i] = a5[i][67:0];
        opb5[i] = b5[i][67:0];
      end
      foreach (a3[i]) begin
        a3[i] = rnd(51, sa);
        b3[i] = rnd(51, sb);
        opa3[i] = a3[i][50:0];
        opb3[i] = b3[i][50:0];
      end
      c5 = polymul(a5, b5, -16);
      c3 = polymul(a3, b3, 7);
      // Every fourth product also gets a per-coefficient addend.
      foreach (c5[j]) begin
        add5[j] = (it % 4 == 3) ? 150'(rnd(90, 1)) : '0;
        c5[j] += big_t'($signed(add5[j]));
      end
      foreach (c3[j]) begin
        add3[j] = (it % 4 == 3) ? 116'(rnd(80, 1)) : '0;
        c3[j] += big_t'($signed(add3[j]));
      end
      // Issue terms 0..4 (the N=3 instance takes the first three).
      for (int t = 0; t < 5; t++) begin
        issue = 1; term = 3'(t); first = (t == 0); last = (t == 4);
        @(negedge clk);
        // c_3 counts cycles since the last N=3 issue cycle (t == 2).
        if (t == 2) c_3 = 0;
        if (t > 2) c_3++;
      end
      issue = 0; first = 0; last = 0; term = '0;
      opa5 = '0;  // operands may change once issued
      c_5 = 0;
      seen3 = 0;
      for (int c = 1; c < 40; c++) begin
        c_3++;
        if (rv3) begin
          seen3 = 1;
          checks++;
          if (c_3 != 3 + (short_rec ? 5 : 8)) begin
            failures++;
            $display("FAIL N=3 latency %0d", c_3);
          end
          foreach (c3[j]) cmp(big_t'($signed(res3[j])), c3[j], short_rec ? 51 : 0, "N=3");
        end
        if (rv5) begin
          c_5 = c;
          break;
        end
        @(negedge clk);
      end
      checks += 2;
      if (!seen3) begin
        failures++;
        $display("FAIL N=3 no result");
      end
      if (c_5 != 3 + (short_rec ? 3 : 6)) begin
        failures++;
        $display("FAIL N=5 latency %0d", c_5);
      end
      foreach (c5[j]) cmp(big_t'($signed(res5[j])), c5[j], short_rec ? 68 : 0, "N=5");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
