// nmpra_pkg - types and constants shared by the nHSE dynamic scheduler.
//
// The scheduler serves NTASKS hardware tasks of an nMPRA pipeline (five in
// the reference configuration, selected by a 3-bit SelectTask bus).  Every
// task belongs to one scheduling class at a time:
//   CLS_IDLE - not activated, waits for its event
//   CLS_EMTQ - execution medium time queue: highest class, ordered by the
//              task's average execution time (shortest first)
//   CLS_ITQ  - interrupted task queue: tasks preempted while running,
//              ordered by fixed priority (task 0 highest)
//   CLS_LTQ  - long task queue: tasks whose run overran the round-robin
//              timer, served round robin
// The class names and their order follow the algorithm; the 2-bit encoding
// is this design's choice.
package nmpra_pkg;

  // Number of hardware tasks and width of the task index (SelectTask[2..0]).
  localparam int unsigned NTASKS_DEF = 5;
  localparam int unsigned TASK_W     = 3;

  // Width of mrCntRun / mrCntAvgRun (one 32-bit register per task).
  localparam int unsigned CNT_W_DEF  = 32;

  // Machine cycles the current task is held stalled before the task
  // selection changes (pipeline synchronisation wait).
  localparam int unsigned SWITCH_WAIT_DEF = 3;

  typedef enum logic [1:0] {
    CLS_IDLE = 2'd0,
    CLS_EMTQ = 2'd1,
    CLS_ITQ  = 2'd2,
    CLS_LTQ  = 2'd3
  } task_class_e;

  // States of the task switch sequencer.
  typedef enum logic [1:0] {
    SW_RUN     = 2'd0,  // a task (or none) executes, no switch pending
    SW_STALL   = 2'd1,  // every task stalled, waiting for the pipeline
    SW_RESTART = 2'd2   // SelectTask changed, new task's PC restarted
  } switch_state_e;

endpackage
