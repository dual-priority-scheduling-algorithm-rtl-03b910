// rr_timer - global Round Robin timer (TRB) of the dynamic scheduler.
//
// Watches how long the current task has been executing without a break.
// The count restarts whenever a task is (re)started (restart_i, the cycle
// the switch sequencer restarts a task) and advances in every cycle in
// which a task executes (run_i).  When it reaches the programmed period
// (period_i) the timer pulses expire_o for one cycle and starts a new
// period: the scheduler then moves the current task into the long task
// queue, or rotates the round robin if the task is already there.
//
// The period is meant to be set by software to the recurrence of the
// slowest task or less; here it is a plain input (the register that holds
// it belongs to the global nHSE registers).  A period of 0 disables the
// timer.  Counting only executing cycles and restarting on every task start
// are this design's choices.
//
// Timing: expire_o is high in the cycle after the period-th executing cycle
// counted since the last restart.  Synchronous active-low reset.
module rr_timer
  import nmpra_pkg::*;
#(
  parameter int unsigned CNT_W = CNT_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] period_i,   // TRB period in machine cycles
  input  logic             restart_i,  // a task is started: count again
  input  logic             run_i,      // a task executes in this cycle
  output logic             expire_o,   // one-cycle expiry pulse
  output logic [CNT_W-1:0] count_o     // current TRB count
);

  logic [CNT_W-1:0] cnt_q;
  logic             exp_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q <= '0;
      exp_q <= 1'b0;
    end else begin
      exp_q <= 1'b0;
      if (restart_i) begin
        cnt_q <= '0;
      end else if (run_i && (period_i != '0)) begin
        if (cnt_q + 1'b1 >= period_i) begin
          cnt_q <= '0;
          exp_q <= 1'b1;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

  assign expire_o = exp_q;
  assign count_o  = cnt_q;

endmodule
