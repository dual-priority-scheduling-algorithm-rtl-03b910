// dual_priority_sched - class bookkeeping and task selection of the dynamic
// dual priority algorithm.
//
// Every task is in one class (nmpra_pkg::task_class_e).  The classes change
// on these events, all sampled at the clock edge:
//   activation (ready_i[k])        IDLE -> EMTQ
//   end of execution (done_i[k])   any  -> IDLE (-> EMTQ if ready_i[k] too)
//   preemption (preempt_i)         the running task, if EMTQ, -> ITQ
//   TRB expiry (trb_expire_i)      the running task, if not LTQ, -> LTQ;
//                                  in the LTQ the round robin moves on
//
// Selection is combinational from the class registers, so the choice
// follows an event by one machine cycle:
//   Running State (rs_o = 1, some task in the EMTQ): the EMTQ task with the
//     smallest average execution time (mrCntAvgRun) wins - the task most
//     likely to finish before another one becomes active, which is how the
//     design applies earliest-deadline-first.  On equal averages the running
//     task keeps the pipeline, otherwise the lower task number wins.
//   Idle State (rs_o = 0): the ITQ task with the highest fixed priority
//     (task 0 highest); if the ITQ is empty, the LTQ task found first from
//     the round-robin pointer onwards.
// The three classes, their order, the per-class policies and the TRB
// promotion are the algorithm's.  Reading the Running/Idle State as "EMTQ
// not empty / empty", ordering the EMTQ by the average alone, the fixed
// priority order and the round-robin pointer handling are this design's
// choices.  Ready events for a task that is already queued are ignored.
module dual_priority_sched
  import nmpra_pkg::*;
#(
  parameter int unsigned NTASKS = NTASKS_DEF,
  parameter int unsigned CNT_W  = CNT_W_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NTASKS-1:0]      ready_i,       // task activation events
  input  logic [NTASKS-1:0]      done_i,        // end of task execution
  input  logic [CNT_W-1:0]       avg_i [NTASKS],// mrCntAvgRun per task
  input  logic                   trb_expire_i,  // round-robin timer expired
  // state of the switch sequencer
  input  logic                   cur_valid_i,
  input  logic [TASK_W-1:0]      cur_task_i,
  input  logic                   start_i,       // cur_task_i restarts now
  input  logic                   preempt_i,     // cur_task_i switched out
  // decision
  output logic                   next_valid_o,
  output logic [TASK_W-1:0]      next_task_o,
  output logic                   rs_o,          // Running State
  output task_class_e            class_o [NTASKS]
);

  task_class_e       cls_q [NTASKS];
  logic [TASK_W-1:0] rr_ptr_q;

  // ---------------------------------------------------------------- select
  logic              emtq_any, itq_any, ltq_any;
  logic [TASK_W-1:0] emtq_sel, itq_sel, ltq_sel;
  logic [CNT_W-1:0]  emtq_best;

  always_comb begin
    emtq_any  = 1'b0;
    itq_any   = 1'b0;
    ltq_any   = 1'b0;
    emtq_sel  = '0;
    itq_sel   = '0;
    ltq_sel   = '0;
    emtq_best = '0;
    for (int k = 0; k < NTASKS; k++) begin
      if (cls_q[k] == CLS_EMTQ) begin
        if (!emtq_any || (avg_i[k] < emtq_best) ||
            ((avg_i[k] == emtq_best) && cur_valid_i &&
             (cur_task_i == TASK_W'(k)))) begin
          emtq_sel  = TASK_W'(k);
          emtq_best = avg_i[k];
        end
        emtq_any = 1'b1;
      end
    end
    for (int k = NTASKS - 1; k >= 0; k--) begin
      if (cls_q[k] == CLS_ITQ) begin
        itq_sel = TASK_W'(k);
        itq_any = 1'b1;
      end
    end
    for (int i = NTASKS - 1; i >= 0; i--) begin
      int unsigned idx;
      idx = (int'(rr_ptr_q) + i) % NTASKS;
      if (cls_q[idx] == CLS_LTQ) begin
        ltq_sel = TASK_W'(idx);
        ltq_any = 1'b1;
      end
    end
  end

  always_comb begin
    rs_o         = emtq_any;
    next_valid_o = emtq_any || itq_any || ltq_any;
    if (emtq_any)     next_task_o = emtq_sel;
    else if (itq_any) next_task_o = itq_sel;
    else              next_task_o = ltq_sel;
  end

  // ---------------------------------------------------------- class update
  function automatic logic [TASK_W-1:0] rr_next(input logic [TASK_W-1:0] t);
    return (int'(t) == NTASKS - 1) ? '0 : t + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NTASKS; k++) cls_q[k] <= CLS_IDLE;
      rr_ptr_q <= '0;
    end else begin
      for (int k = 0; k < NTASKS; k++) begin
        logic is_cur;
        is_cur = cur_valid_i && (cur_task_i == TASK_W'(k));
        if (done_i[k]) begin
          cls_q[k] <= ready_i[k] ? CLS_EMTQ : CLS_IDLE;
        end else if (is_cur && trb_expire_i && cls_q[k] != CLS_LTQ) begin
          cls_q[k] <= CLS_LTQ;
        end else if (is_cur && preempt_i && cls_q[k] == CLS_EMTQ) begin
          cls_q[k] <= CLS_ITQ;
        end else if (ready_i[k] && cls_q[k] == CLS_IDLE) begin
          cls_q[k] <= CLS_EMTQ;
        end
      end
      // round robin: a restarted LTQ task holds the pointer until its
      // time slice (the TRB period) runs out, then the pointer moves on
      if (cur_valid_i && trb_expire_i)
        rr_ptr_q <= rr_next(cur_task_i);
      else if (start_i && cls_q[cur_task_i] == CLS_LTQ)
        rr_ptr_q <= cur_task_i;
    end
  end

  assign class_o = cls_q;

  // The scheduler never names a task that is not queued.
  a_next_queued: assert property (@(posedge clk) disable iff (!rst_n)
    next_valid_o |-> cls_q[next_task_o] != CLS_IDLE);

endmodule
