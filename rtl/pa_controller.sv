// pa_controller: step sequencer of the GF(p) point adder.
//
// The published design has four independent units, a multiplier, an adder,
// a subtractor and a halving ("shift") unit, run by a control unit that
// groups the operations of one mixed-coordinate point addition into 11
// steps.  Each step starts one multiplication and up to one addition,
// subtraction and halving together (ecc_pkg::step_uop).  The multiplication
// is the longest operation of a step, so the controller moves to the next
// step when the multiplier reports done.
//
// Interface and timing:
//   start        accepted when idle.  load_inputs is high in that cycle, and
//                the register file takes the input point at its edge.
//   issue, uop   the next cycle issues step 1.  Every later step is issued in
//                the cycle the multiplier's done arrives for the previous
//                one, so steps follow back to back with no gap.
//   uop_q        the micro-operation word of the step in progress.  It is
//                held for the whole step, so the results can be written to
//                their destination registers when each unit finishes.
//   done         one-cycle pulse in the cycle the 11th multiplication
//                finishes.  It comes 11*L + 1 cycles after start, where L is
//                the multiplier latency.
// The step grouping follows the published schedule.  The encoding and the
// handshake are this design's own.
module pa_controller
  import ecc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic mul_done,
  output logic load_inputs,
  output logic issue,
  output uop_t uop,
  output uop_t uop_q,
  output logic busy,
  output logic done
);
  typedef enum logic [1:0] {S_IDLE, S_FIRST, S_RUN} state_e;

  state_e      state_q;
  logic [3:0]  step_q;          // index (0..10) of the step in progress
  logic [3:0]  issue_idx;

  always_comb begin
    load_inputs = (state_q == S_IDLE) && start;
    issue       = 1'b0;
    done        = 1'b0;
    issue_idx   = '0;
    unique case (state_q)
      S_FIRST: issue = 1'b1;
      S_RUN: if (mul_done) begin
        if (step_q == 4'(NUM_STEPS - 1)) done = 1'b1;
        else begin
          issue     = 1'b1;
          issue_idx = step_q + 4'd1;
        end
      end
      default: ;
    endcase
    uop  = step_uop(int'(issue_idx));
    busy = (state_q != S_IDLE);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      step_q  <= '0;
      uop_q   <= step_uop(0);
    end else begin
      if (issue) begin
        step_q <= issue_idx;
        uop_q  <= uop;
      end
      unique case (state_q)
        S_IDLE:  if (start) state_q <= S_FIRST;
        S_FIRST: state_q <= S_RUN;
        S_RUN:   if (done) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A new step may only be issued once the previous multiplication is done.
  a_issue_after_mul: assert property (@(posedge clk) disable iff (!rst_n)
    issue && state_q == S_RUN |-> mul_done);
endmodule
