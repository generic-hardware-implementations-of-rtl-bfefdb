// amns_ctrl: sequencer of one AMNS modular multiplication.
//
// The Montgomery-like multiplication needs three polynomial products that
// depend on each other: C = A*B mod E, then Q = C*M' mod (E, phi), then
// U = C + Q*M mod E, and finally S = U / phi. The controller runs them one
// after the other on the same N resources: for each product it issues the
// N operand terms (term 0..N-1), waits for the resources' result pulse and
// has the result captured, then starts the next product. The Q product uses
// the short recombination. A last cycle loads the output register and
// raises done_o for one cycle.
//
// Interface: start_i is accepted only when idle (busy_o low); load_o then
// tells the datapath to capture its operands. pass_o names the running
// product, cap_o the cycle its result must be captured, final_o the cycle
// the output register is loaded. Timing: with R_full/R_short recombination steps,
// done_o rises 10 + 3N + 2*R_full + R_short cycles after the start edge;
// the 10 extra cycles are the operand capture, three stages per product
// (operand preparation, DSP product register, result capture) and the
// output register. That total matches the cycle count the design is specified
// with; how the 10 bubbles are spread is this design's choice.
module amns_ctrl
  import amns_pkg::*;
#(
  parameter int unsigned N   = 5,
  localparam int unsigned T_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start_i,
  input  logic           res_valid_i,
  output logic           busy_o,
  output logic           load_o,
  output logic           issue_o,
  output logic           first_o,
  output logic           last_o,
  output logic [T_W-1:0] term_o,
  output pass_e          pass_o,
  output logic           short_o,
  output logic           cap_o,
  output logic           final_o,
  output logic           done_o
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_FINAL} state_e;

  state_e         state_q;
  pass_e          pass_q;
  logic [T_W-1:0] term_q;

  assign busy_o  = (state_q != S_IDLE);
  assign load_o  = (state_q == S_IDLE) && start_i;
  assign issue_o = (state_q == S_ISSUE);
  assign first_o = issue_o && (term_q == '0);
  assign last_o  = issue_o && (term_q == T_W'(N - 1));
  assign term_o  = term_q;
  assign pass_o  = pass_q;
  assign short_o = (pass_q == PASS_CMP);
  assign cap_o   = (state_q == S_WAIT) && res_valid_i;
  assign final_o = (state_q == S_FINAL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      pass_q  <= PASS_AB;
      term_q  <= '0;
      done_o  <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (start_i) begin
            state_q <= S_ISSUE;
            pass_q  <= PASS_AB;
            term_q  <= '0;
          end
        end
        S_ISSUE: begin
          if (last_o) begin
            state_q <= S_WAIT;
            term_q  <= '0;
          end else begin
            term_q <= term_q + 1'b1;
          end
        end
        S_WAIT: begin
          if (res_valid_i) begin
            if (pass_q == PASS_QM) begin
              state_q <= S_FINAL;
            end else begin
              state_q <= S_ISSUE;
              pass_q  <= (pass_q == PASS_AB) ? PASS_CMP : PASS_QM;
            end
          end
        end
        default: begin  // S_FINAL
          state_q <= S_IDLE;
          done_o  <= 1'b1;
        end
      endcase
    end
  end

  // The resources may only report a result the controller is waiting for.
  a_res_in_wait: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid_i |-> state_q == S_WAIT);

endmodule
