// task_run_avg - execution-time registers of one hardware task.
//
// Holds the two local nHSE registers of a task:
//   mrCntRun    (cnt_o) counts every machine cycle in which the task is
//               actually executing (run_i high, i.e. after it was started
//               again and while it is not stalled).  A preemption only
//               pauses it, so it sums the whole activation.
//   mrCntAvgRun (avg_o) the task's average execution time.  At the end of
//               an activation (done_i) the cycle count is added to the old
//               average and the sum is shifted right by one, a division by
//               two:  avg <= (cnt + avg) >> 1.  The counter then clears.
// The update rule, the zero starting value of the average and the 32-bit
// register follow the algorithm description; the cost is one register, one
// adder and a one-bit right shift per task.
//
// Design choices: the add is done one bit wider so the carry is kept before
// the shift (no overflow for any two CNT_W-bit values); the counter
// saturates at its maximum instead of wrapping; a cycle with both run_i and
// done_i high is counted as part of the activation that ends there.
//
// Timing: avg_o shows the new average one clock after the done_i cycle.
// Reset (active low, synchronous) clears both registers.
module task_run_avg
  import nmpra_pkg::*;
#(
  parameter int unsigned CNT_W = CNT_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run_i,   // task executes in this cycle
  input  logic             done_i,  // end of the task's execution
  output logic [CNT_W-1:0] cnt_o,   // mrCntRun
  output logic [CNT_W-1:0] avg_o    // mrCntAvgRun
);

  logic [CNT_W-1:0] cnt_q, avg_q;
  logic [CNT_W-1:0] cnt_inc;   // count including the current cycle
  logic [CNT_W:0]   sum;       // one bit wider: keeps the carry

  always_comb begin
    cnt_inc = cnt_q;
    if (run_i && (cnt_q != '1)) cnt_inc = cnt_q + 1'b1;
    sum = {1'b0, cnt_inc} + {1'b0, avg_q};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q <= '0;
      avg_q <= '0;
    end else if (done_i) begin
      avg_q <= sum[CNT_W:1];   // (cnt + avg) >> 1
      cnt_q <= '0;
    end else begin
      cnt_q <= cnt_inc;
    end
  end

  assign cnt_o = cnt_q;
  assign avg_o = avg_q;

endmodule
