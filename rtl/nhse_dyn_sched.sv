// nhse_dyn_sched - dynamic dual priority scheduler of the nHSE (n Hardware
// Scheduler Engine) for an nMPRA multi-pipeline-register processor.
//
// An nMPRA core keeps one set of pipeline registers per hardware task and
// shares ROM, RAM and ALU among them; the scheduler decides which task owns
// the shared resources.  This block is that scheduler's dynamic half:
//   - one task_run_avg per task measures each activation in machine cycles
//     (mrCntRun) and keeps a running average (mrCntAvgRun = (run+avg)>>1);
//   - rr_timer is the global Round Robin timer (TRB) that catches a task
//     running too long;
//   - dual_priority_sched keeps every task in the EMTQ, ITQ or LTQ class and
//     picks the next task (shortest average first, then fixed priority, then
//     round robin);
//   - task_switch_ctrl stalls the pipeline, waits three cycles and restarts
//     the chosen task, which executes five machine cycles after the event
//     that made it the best choice.
//
// Interface: ready_i[k] is a one-cycle activation event for task k (from
// the nHSE event logic: interrupts, timers, mutexes, ...), done_i[k] is the
// end-of-execution signal of task k from the pipeline, taken into account
// only while task k executes.  trb_period_i is the TRB period in machine
// cycles (0 disables it).  The outputs drive the pipeline: SelectTask
// (select_task_o), processXstall, processXresetstall, processXstartagain;
// run_o tells which task executes in a cycle, process_ready_o which tasks
// are active (activated and not yet ended, the processXready flags).  The class of each task, the
// Running State flag, both counters of each task and a TRB expiry pulse are
// brought out for observation.  One clock; one clock period is one machine
// cycle.  Synchronous active-low reset: all tasks idle, averages zero.
module nhse_dyn_sched
  import nmpra_pkg::*;
#(
  parameter int unsigned NTASKS      = NTASKS_DEF,
  parameter int unsigned CNT_W       = CNT_W_DEF,
  parameter int unsigned SWITCH_WAIT = SWITCH_WAIT_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NTASKS-1:0] ready_i,
  input  logic [NTASKS-1:0] done_i,
  input  logic [CNT_W-1:0]  trb_period_i,
  output logic [TASK_W-1:0] select_task_o,
  output logic              task_valid_o,
  output logic [NTASKS-1:0] run_o,
  output logic [NTASKS-1:0] stall_o,
  output logic [NTASKS-1:0] resetstall_o,
  output logic [NTASKS-1:0] startagain_o,
  output logic [NTASKS-1:0] process_ready_o,
  output logic              rs_o,
  output task_class_e       class_o   [NTASKS],
  output logic [CNT_W-1:0]  cnt_run_o [NTASKS],
  output logic [CNT_W-1:0]  cnt_avg_o [NTASKS],
  output logic              trb_expire_o
);

  logic [NTASKS-1:0] run, done_eff;
  logic              next_valid, start, preempt, switching;
  logic [TASK_W-1:0] next_task, cur_task;
  logic              cur_valid, trb_expire;

  // an end of execution counts only for the task that executes
  assign done_eff = done_i & run;

  for (genvar k = 0; k < NTASKS; k++) begin : g_task
    task_run_avg #(.CNT_W(CNT_W)) u_avg (
      .clk   (clk),
      .rst_n (rst_n),
      .run_i (run[k]),
      .done_i(done_eff[k]),
      .cnt_o (cnt_run_o[k]),
      .avg_o (cnt_avg_o[k])
    );
  end

  rr_timer #(.CNT_W(CNT_W)) u_trb (
    .clk      (clk),
    .rst_n    (rst_n),
    .period_i (trb_period_i),
    .restart_i(start),
    .run_i    (|run),
    .expire_o (trb_expire),
    .count_o  ()
  );

  dual_priority_sched #(.NTASKS(NTASKS), .CNT_W(CNT_W)) u_sched (
    .clk         (clk),
    .rst_n       (rst_n),
    .ready_i     (ready_i),
    .done_i      (done_eff),
    .avg_i       (cnt_avg_o),
    .trb_expire_i(trb_expire && !switching),
    .cur_valid_i (cur_valid),
    .cur_task_i  (cur_task),
    .start_i     (start),
    .preempt_i   (preempt),
    .next_valid_o(next_valid),
    .next_task_o (next_task),
    .rs_o        (rs_o),
    .class_o     (class_o)
  );

  task_switch_ctrl #(.NTASKS(NTASKS), .SWITCH_WAIT(SWITCH_WAIT)) u_switch (
    .clk          (clk),
    .rst_n        (rst_n),
    .next_valid_i (next_valid),
    .next_task_i  (next_task),
    .done_i       (done_eff),
    .select_task_o(cur_task),
    .cur_valid_o  (cur_valid),
    .run_o        (run),
    .stall_o      (stall_o),
    .resetstall_o (resetstall_o),
    .startagain_o (startagain_o),
    .start_o      (start),
    .preempt_o    (preempt),
    .switching_o  (switching)
  );

  assign select_task_o = cur_task;
  assign task_valid_o  = cur_valid;
  assign run_o         = run;
  assign trb_expire_o  = trb_expire;

  // processXready: the task has been activated and has not ended yet
  for (genvar k = 0; k < NTASKS; k++) begin : g_ready
    assign process_ready_o[k] = (class_o[k] != CLS_IDLE);
  end

endmodule
