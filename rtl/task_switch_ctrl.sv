// task_switch_ctrl - task switch sequencer of the nHSE scheduler.
//
// Owns the shared pipeline (ROM, RAM, ALU) on behalf of one hardware task
// at a time and carries out a task switch in two steps: stop the current
// task's program counter, then hand the resources to the new task.  Because
// the shared resources are still busy with the old task's instructions for
// a while, the switch cannot be done in a single cycle:
//
//   SW_RUN      the task on SelectTask executes (run_o); every other task
//               is held by its processXstall line.  When the scheduler
//               names a different task (or the current task ends) the
//               sequencer moves on; a still-unfinished task is reported
//               as preempted (preempt_o) in that cycle.
//   SW_STALL    all tasks stalled for SWITCH_WAIT (3) machine cycles.  In
//               the last of them the scheduler's choice is taken.
//   SW_RESTART  SelectTask drives the new task and its processXresetstall
//               and processXstartagain lines pulse for one cycle; it
//               executes from the next cycle on.
//
// Timing: a new choice on next_task_i before clock edge A puts the
// sequencer in SW_STALL at A, in SW_RESTART at A+3 and the task executes
// from A+4 on.  Inside the scheduler a task that becomes active at edge E
// is chosen in the cycle after E (A = E+1), so its code starts executing
// five machine cycles after it became active, the same for every switch.
// The three stall cycles and the five-cycle total follow the reference
// design; collapsing its three quadrature clocks into one clock, so that a
// machine cycle is one clock period, is this design's choice, as is passing
// through the same sequence when the pipeline was idle.
module task_switch_ctrl
  import nmpra_pkg::*;
#(
  parameter int unsigned NTASKS      = NTASKS_DEF,
  parameter int unsigned SWITCH_WAIT = SWITCH_WAIT_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  // choice of the scheduler
  input  logic              next_valid_i,
  input  logic [TASK_W-1:0] next_task_i,
  // end of execution, per task (only the executing task's line is used)
  input  logic [NTASKS-1:0] done_i,
  // pipeline control
  output logic [TASK_W-1:0] select_task_o,  // SelectTask[2..0]
  output logic              cur_valid_o,    // a task owns the pipeline
  output logic [NTASKS-1:0] run_o,          // task executes this cycle
  output logic [NTASKS-1:0] stall_o,        // processXstall
  output logic [NTASKS-1:0] resetstall_o,   // processXresetstall
  output logic [NTASKS-1:0] startagain_o,   // processXstartagain
  // to the scheduler and the round-robin timer
  output logic              start_o,        // a task is restarted now
  output logic              preempt_o,      // current task is switched out
  output logic              switching_o     // a switch is in progress
);

  localparam int unsigned WAIT_W = (SWITCH_WAIT > 1) ? $clog2(SWITCH_WAIT) : 1;

  switch_state_e     state_q;
  logic [WAIT_W-1:0] wait_q;
  logic [TASK_W-1:0] cur_q;
  logic              cur_valid_q;
  logic              cur_done;
  logic              need_switch;

  always_comb begin
    cur_done    = cur_valid_q && done_i[cur_q];
    need_switch = cur_done ||
                  (next_valid_i && (!cur_valid_q || (next_task_i != cur_q)));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q     <= SW_RUN;
      wait_q      <= '0;
      cur_q       <= '0;
      cur_valid_q <= 1'b0;
    end else begin
      unique case (state_q)
        SW_RUN: begin
          if (need_switch) begin
            state_q     <= SW_STALL;
            wait_q      <= '0;
            if (cur_done) cur_valid_q <= 1'b0;
          end
        end
        SW_STALL: begin
          if (wait_q == WAIT_W'(SWITCH_WAIT - 1)) begin
            if (next_valid_i) begin
              state_q     <= SW_RESTART;
              cur_q       <= next_task_i;
              cur_valid_q <= 1'b1;
            end else begin
              state_q     <= SW_RUN;
              cur_valid_q <= 1'b0;
            end
          end else begin
            wait_q <= wait_q + 1'b1;
          end
        end
        SW_RESTART: state_q <= SW_RUN;
        default:    state_q <= SW_RUN;
      endcase
    end
  end

  always_comb begin
    run_o        = '0;
    resetstall_o = '0;
    startagain_o = '0;
    stall_o      = '1;
    if (state_q == SW_RUN && cur_valid_q) begin
      run_o[cur_q]   = 1'b1;
      stall_o[cur_q] = 1'b0;
    end
    if (state_q == SW_RESTART) begin
      resetstall_o[cur_q] = 1'b1;
      startagain_o[cur_q] = 1'b1;
    end
  end

  assign select_task_o = cur_q;
  assign cur_valid_o   = cur_valid_q;
  assign start_o       = (state_q == SW_RESTART);
  assign preempt_o     = (state_q == SW_RUN) && need_switch && !cur_done &&
                         cur_valid_q;
  assign switching_o   = (state_q != SW_RUN);

  // The pipeline belongs to at most one task at a time.
  a_one_runner: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(run_o));
  // A task is never executing and stalled at once.
  a_run_not_stalled: assert property (@(posedge clk) disable iff (!rst_n)
    (run_o & stall_o) == '0);

endmodule
