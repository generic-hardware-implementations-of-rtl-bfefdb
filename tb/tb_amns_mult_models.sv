// tb_amns_mult_models: the modular multiplier at other sizes and with the
// Column model.
//
// Five configurations run side by side, each checked coefficient by
// coefficient against the big-integer reference and for its latency:
//   N=5 K=4 lambda=-16 Column model      (256-bit size, 64 cycles)
//   N=7 K=5 lambda=2   Line Column model (512-bit size, 51 cycles)
//   N=7 K=5 lambda=-3  Column model                       (93 cycles)
//   N=3 K=3 lambda=5   Line Column model, phi = 2^48       (29 cycles)
//   N=2 K=2 lambda=-1  Column model, phi = 2^30            (24 cycles)
// Expected latencies are 10 + 3N + 2R + R', with R = 2K-2, R' = K-1 for the
// Line Column model and R = K*K-1, R' = K(K+1)/2-1 for the Column model.
module tb_amns_mult_models;
  import amns_pkg::*;

  localparam int NCFG = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NCFG-1:0] done;
  int chk [NCFG];
  int fail [NCFG];

  amns_mult_harness #(.N(5), .K(4), .LAMBDA(-16), .MODEL(MODEL_COLUMN), .NMUL(12), .EXP_LAT(64)) u_c0 (
    .clk(clk), .rst_n(rst_n), .done_o(done[0]), .checks_o(chk[0]), .failures_o(fail[0]));
  amns_mult_harness #(.N(7), .K(5), .LAMBDA(2), .MODEL(MODEL_LINE_COLUMN), .NMUL(12), .EXP_LAT(51)) u_c1 (
    .clk(clk), .rst_n(rst_n), .done_o(done[1]), .checks_o(chk[1]), .failures_o(fail[1]));
  amns_mult_harness #(.N(7), .K(5), .LAMBDA(-3), .MODEL(MODEL_COLUMN), .NMUL(12), .EXP_LAT(93)) u_c2 (
    .clk(clk), .rst_n(rst_n), .done_o(done[2]), .checks_o(chk[2]), .failures_o(fail[2]));
  amns_mult_harness #(.N(3), .K(3), .LAMBDA(5), .MODEL(MODEL_LINE_COLUMN), .PHI_W(48), .NMUL(12), .EXP_LAT(29)) u_c3 (
    .clk(clk), .rst_n(rst_n), .done_o(done[3]), .checks_o(chk[3]), .failures_o(fail[3]));
  amns_mult_harness #(.N(2), .K(2), .LAMBDA(-1), .MODEL(MODEL_COLUMN), .PHI_W(30), .NMUL(12), .EXP_LAT(24)) u_c4 (
    .clk(clk), .rst_n(rst_n), .done_o(done[4]), .checks_o(chk[4]), .failures_o(fail[4]));

  int checks, failures;

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&done);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
