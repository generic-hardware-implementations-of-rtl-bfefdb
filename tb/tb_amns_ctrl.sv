// tb_amns_ctrl: sequencing of the three products of one modular
// multiplication.
//
// A stand-in for the resources answers every last issue with a result
// pulse D cycles later, as the Line Column resources with K = 4 do: three
// register stages plus 2K-2 = 6 recombination steps (D = 9), or K-1 = 3
// steps for the short recombination (D = 6). The test checks that each
// product issues exactly the terms 0..N-1 with first/last marks, that the
// products come in the order A*B, C*M', Q*M with short recombination only on
// the second, that each result is captured in the pulse cycle, that start is
// ignored while busy, and that done pulses 10 + 3N + 2*6 + 3 = 40 cycles
// after the start edge.
module tb_amns_ctrl;
  import amns_pkg::*;

  localparam int N = 5;
  localparam int D = 9;   // full recombination
  localparam int DS = 6;  // short recombination

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, res_valid, busy, load, issue, first, last, short_rec, cap, fin, done;
  logic [2:0] term;
  pass_e pass;

  amns_ctrl #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .res_valid_i(res_valid),
    .busy_o(busy), .load_o(load), .issue_o(issue), .first_o(first), .last_o(last),
    .term_o(term), .pass_o(pass), .short_o(short_rec), .cap_o(cap), .final_o(fin),
    .done_o(done));

  // Resource stand-in: result pulse D cycles after a last issue.
  logic [D-1:0] pipe;
  logic         short_pending;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pipe          <= '0;
      short_pending <= 1'b0;
    end else begin
      pipe <= {pipe[D-2:0], last};
      if (last) short_pending <= short_rec;
    end
  assign res_valid = short_pending ? pipe[DS-1] : pipe[D-1];

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, nterm, npass, ncap, nfin, ndone;
    pass_e expect_pass;
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 6; it++) begin
      @(negedge clk);
      check(!busy && !issue, "idle before start");
      start = 1;
      #1 check(load, "load with start");
      @(negedge clk);
      start = (it == 2);  // a start while busy must be ignored
      cyc = 0; nterm = 0; npass = 0; ncap = 0; nfin = 0; ndone = 0;
      expect_pass = PASS_AB;
      while (!done && cyc < 500) begin
        check(busy && !load, "busy, no load while running");
        if (issue) begin
          check(term == 3'(nterm), $sformatf("term %0d expected %0d", term, nterm));
          check(first == (nterm == 0) && last == (nterm == N - 1), "first/last marks");
          check(pass == expect_pass, "pass order");
          check(short_rec == (pass == PASS_CMP), "short recombination on C*M' only");
          nterm++;
          if (nterm == N) nterm = 0;
        end
        if (cap) begin
          check(res_valid && pass == expect_pass, "capture on result pulse");
          ncap++;
          expect_pass = (expect_pass == PASS_AB) ? PASS_CMP : PASS_QM;
        end
        if (fin) nfin++;
        @(negedge clk);
        start = 0;
        cyc++;
      end
      check(ncap == 3 && nfin == 1, "three captures and one final step");
      check(cyc == 40, $sformatf("latency %0d", cyc));
      @(negedge clk);
      check(!done, "done is one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
