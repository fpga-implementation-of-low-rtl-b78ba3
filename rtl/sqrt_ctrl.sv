// sqrt_ctrl: iteration sequencer of the low-area square root calculator.
//
// The area-optimized calculator shares one PRC/PSC pair among all root bits,
// so the bits are computed one per clock cycle. This sequencer accepts a
// start request while idle, then issues exactly M iteration steps on M
// consecutive cycles (the first on the cycle the start is accepted), marks
// the first and the last step, and raises done_o for one cycle after the
// last step, when the full root is in its output register.
//
// Interface: start_i/ready_o form a valid/ready pair (a start is taken when
// both are 1 on a rising clock edge); step_o, first_o and last_o qualify the
// current cycle; done_o is a registered one-cycle pulse.
// Timing: if a start is accepted in cycle c, steps run in cycles c .. c+M-1,
// done_o is 1 in cycle c+M and ready_o is 1 again in that same cycle, so a
// new radicand can be taken every M cycles with no gap.
//
// The n/2-cycle latency follows the published design; the start/ready/done
// handshake and the asynchronous active-low reset are this design's own
// choices, as the published design shows only a clock, a reset, the
// radicand and the root.
module sqrt_ctrl
  import sqrt_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start_i,
  output logic ready_o,
  output logic step_o,
  output logic first_o,
  output logic last_o,
  output logic done_o
);

  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;

  sqrt_state_t   state_q;
  logic [CW-1:0] cnt_q;   // number of steps already done in this operation

  assign ready_o = (state_q == ST_IDLE);
  assign first_o = ready_o && start_i;
  assign step_o  = first_o || (state_q == ST_RUN);
  assign last_o  = (state_q == ST_RUN) && (cnt_q == CW'(M - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      cnt_q   <= '0;
      done_o  <= 1'b0;
    end else begin
      done_o <= step_o && last_o;
      if (first_o) begin
        state_q <= ST_RUN;
        cnt_q   <= CW'(1);
      end else if (state_q == ST_RUN) begin
        if (last_o) begin
          state_q <= ST_IDLE;
          cnt_q   <= '0;
        end else begin
          cnt_q <= cnt_q + CW'(1);
        end
      end
    end
  end

  initial assert (M >= 2) else $error("sqrt_ctrl: M must be at least 2");

  // A step is never issued while idle without a start.
  a_step_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    step_o |-> (start_i || state_q == ST_RUN));
  // done follows the last step by one cycle.
  a_done_after_last: assert property (@(posedge clk) disable iff (!rst_n)
    last_o |=> done_o);

endmodule
