// tb_nhse_dyn_sched - end-to-end test of the dynamic scheduler at its
// default size (five tasks, 32-bit counters).
//
// The testbench stands in for the nMPRA pipeline and the nHSE event logic:
// each activation of a task carries a random amount of work (executing
// cycles); the task's done line is raised in its last executing cycle.
// Tasks 0-2 are short, tasks 3-4 are long and overrun the Round Robin
// timer (TRB period 150 machine cycles).
//
// Checked:
//   - the averaging example (activations of 500, 700, 450, 900, 1000, 1200
//     and 300 cycles give averages 250, 475, 462, 681, 840, 1020, 660)
//     with the task scheduled, timed and promoted by the real scheduler;
//   - the switch latency: a task that becomes active on an idle pipeline,
//     and a shorter task that preempts a running one, both execute five
//     machine cycles after the clock edge that took their event;
//   - every average (mrCntAvgRun) after every activation, against
//     (executed cycles + previous average) >> 1 worked out here;
//   - every restarted task is the right one for the classes and averages
//     the scheduler saw: shortest average in the EMTQ, otherwise the
//     highest-priority ITQ task, otherwise an LTQ task;
//   - per cycle: every task's ready flag is high exactly from its accepted
//     activation to its end;
//   - per cycle: at most one task executes, it is the task on SelectTask
//     and it is the only one not stalled;
//   - no starvation: after the events stop, every accepted activation
//     completes and all tasks return to idle;
//   - each mechanism happened: switch, preemption into the ITQ, dispatch
//     from the ITQ, TRB promotion into the LTQ, round-robin hand-over
//     between LTQ tasks, Running State, Idle State with queued tasks, an
//     idle pipeline and an average update.
module tb_nhse_dyn_sched;
  import nmpra_pkg::*;

  localparam int unsigned N     = NTASKS_DEF;
  localparam int unsigned CNT_W = CNT_W_DEF;
  localparam int unsigned TRB   = 150;

  logic              clk = 1'b0;
  logic              rst_n;
  logic [N-1:0]      ready, done;
  logic [CNT_W-1:0]  trb_period;
  logic [TASK_W-1:0] sel;
  logic              tvalid;
  logic [N-1:0]      run, stall, rstall, sagain, pready;
  logic              rs, trb_exp;
  task_class_e       cls [N];
  logic [CNT_W-1:0]  cnt_run [N];
  logic [CNT_W-1:0]  cnt_avg [N];

  nhse_dyn_sched dut (
    .clk(clk), .rst_n(rst_n), .ready_i(ready), .done_i(done),
    .trb_period_i(trb_period), .select_task_o(sel), .task_valid_o(tvalid),
    .run_o(run), .stall_o(stall), .resetstall_o(rstall), .startagain_o(sagain),
    .process_ready_o(pready),
    .rs_o(rs), .class_o(cls), .cnt_run_o(cnt_run), .cnt_avg_o(cnt_avg),
    .trb_expire_o(trb_exp));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // ------------------------------------------------------- task models
  bit              pending  [N];   // activation accepted, not yet done
  int unsigned     rem      [N];   // executing cycles still to do
  int unsigned     execd    [N];   // executing cycles in this activation
  longint unsigned m_avg    [N];   // expected average
  bit              chk_avg  [N];   // compare the average at next cycle
  int unsigned     accepted [N];
  int unsigned     completed[N];

  // snapshot of what the scheduler saw in the previous cycle
  task_class_e     prev_cls [N];
  logic [CNT_W-1:0] prev_avg [N];
  int              last_started = -1;

  // mechanism counters
  int n_switch = 0, n_preempt = 0, n_itq_dispatch = 0, n_promote = 0;
  int n_rr = 0, n_rs = 0, n_is_queued = 0, n_idle_pipe = 0, n_avg = 0;

  int unsigned ex_run [7] = '{500, 700, 450, 900, 1000, 1200, 300};
  int unsigned ex_avg [7] = '{250, 475, 462, 681, 840, 1020, 660};

  int unsigned work_lo [N] = '{20, 30, 40, 200, 250};
  int unsigned work_hi [N] = '{60, 90, 120, 500, 600};

  // One machine cycle, handled at the falling edge: outputs of the last
  // rising edge are settled, inputs for the next one are driven here.
  task automatic cycle(input logic [N-1:0] want, input int unsigned fixed_work);
    logic [N-1:0] d, r;
    // averages of the activations that ended in the previous cycle
    for (int k = 0; k < N; k++)
      if (chk_avg[k]) begin
        check($sformatf("average of task %0d", k), cnt_avg[k], m_avg[k]);
        chk_avg[k] = 1'b0;
        n_avg++;
      end
    // processXready follows the accepted activations
    for (int k = 0; k < N; k++)
      check($sformatf("task %0d ready flag", k), pready[k], pending[k]);
    // pipeline rules
    check("at most one task executes", $countones(run) <= 1, 1);
    if (run != '0) begin
      check("executing task is on SelectTask", run, N'(1) << sel);
      check("only the executing task is not stalled", stall, N'(~run));
    end
    // a restart: was it the right choice?
    if (sagain != '0) begin
      int k;
      bit any_e, any_i;
      longint unsigned mn;
      k = 0;
      for (int j = 0; j < N; j++) if (sagain[j]) k = j;
      n_switch++;
      any_e = 0; any_i = 0; mn = '1;
      for (int j = 0; j < N; j++) begin
        if (prev_cls[j] == CLS_EMTQ) begin any_e = 1; if (prev_avg[j] < mn) mn = prev_avg[j]; end
        if (prev_cls[j] == CLS_ITQ) any_i = 1;
      end
      if (any_e) begin
        check("restart picks an EMTQ task", prev_cls[k], CLS_EMTQ);
        check("restart picks the shortest average", prev_avg[k] <= mn, 1);
      end else if (any_i) begin
        int first_i = -1;
        for (int j = N - 1; j >= 0; j--) if (prev_cls[j] == CLS_ITQ) first_i = j;
        check("restart picks the first ITQ task", k, first_i);
        n_itq_dispatch++;
      end else begin
        check("restart picks an LTQ task", prev_cls[k], CLS_LTQ);
        if (last_started >= 0 && last_started != k && prev_cls[last_started] == CLS_LTQ)
          n_rr++;
      end
      last_started = k;
    end
    // class transitions
    for (int j = 0; j < N; j++) begin
      if (prev_cls[j] == CLS_EMTQ && cls[j] == CLS_ITQ) n_preempt++;
      if (prev_cls[j] inside {CLS_EMTQ, CLS_ITQ} && cls[j] == CLS_LTQ) n_promote++;
    end
    if (rs) n_rs++;
    else if (cls[0] != CLS_IDLE || cls[1] != CLS_IDLE || cls[2] != CLS_IDLE ||
             cls[3] != CLS_IDLE || cls[4] != CLS_IDLE) n_is_queued++;
    if (!tvalid && last_started >= 0) n_idle_pipe++;
    prev_cls = cls;
    prev_avg = cnt_avg;

    // execution of this cycle
    d = '0;
    for (int k = 0; k < N; k++)
      if (run[k]) begin
        check("only accepted activations execute", pending[k], 1);
        execd[k]++;
        if (rem[k] > 0) rem[k]--;
        if (rem[k] == 0) begin
          d[k] = 1'b1;
          m_avg[k]   = (execd[k] + m_avg[k]) >> 1;
          chk_avg[k] = 1'b1;
          execd[k]   = 0;
          pending[k] = 1'b0;
          completed[k]++;
        end
      end
    // new activations, only for tasks that are not already active
    r = '0;
    for (int k = 0; k < N; k++)
      if (want[k] && !pending[k] && !d[k]) begin
        r[k]       = 1'b1;
        pending[k] = 1'b1;
        rem[k]     = (fixed_work != 0) ? fixed_work
                                       : $urandom_range(work_lo[k], work_hi[k]);
        accepted[k]++;
      end
    done  <= d;
    ready <= r;
    @(negedge clk);
  endtask

  // cycles from the event to the first executing cycle of task t
  task automatic latency(input int t, input int unsigned work, output int lat);
    logic [N-1:0] w;
    w = N'(1) << t;
    cycle(w, work);
    lat = 0;
    while (!run[t] && lat < 40) begin
      cycle('0, 0);
      lat++;
    end
  endtask

  initial begin
    int lat;
    int all_idle;
    rst_n = 1'b0; ready = '0; done = '0; trb_period = CNT_W'(TRB);
    for (int k = 0; k < N; k++) begin
      pending[k] = 0; rem[k] = 0; execd[k] = 0; m_avg[k] = 0; chk_avg[k] = 0;
      accepted[k] = 0; completed[k] = 0; prev_cls[k] = CLS_IDLE; prev_avg[k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    @(negedge clk);

    // switch on an idle pipeline: task 0, 40 cycles of work (average 20)
    latency(0, 40, lat);
    check("switch latency from idle (machine cycles)", lat, 5);
    while (pending[0]) cycle('0, 0);
    repeat (3) cycle('0, 0);
    check("average 20 after 40 cycles", cnt_avg[0], 20);
    // task 0 again (average 20), then task 1 (average 0) preempts it
    cycle(5'b00001, 100);
    while (!run[0]) cycle('0, 0);
    repeat (10) cycle('0, 0);
    latency(1, 30, lat);
    check("preemption latency (machine cycles)", lat, 5);
    check("preempted task waits in the ITQ", cls[0], CLS_ITQ);
    while (pending[1]) cycle('0, 0);
    while (!run[0]) cycle('0, 0);
    check("ITQ task resumes in the Idle State", rs, 0);
    while (pending[0]) cycle('0, 0);
    repeat (10) cycle('0, 0);

    // averaging example through the whole scheduler: task 2 runs the seven
    // activations alone (it overruns the TRB and is served round robin)
    for (int i = 0; i < 7; i++) begin
      cycle(5'b00100, ex_run[i]);
      while (pending[2]) cycle('0, 0);
      cycle('0, 0);
      check($sformatf("example activation %0d: average", i + 1), cnt_avg[2], ex_avg[i]);
    end
    repeat (10) cycle('0, 0);

    // two long tasks together: both overrun the TRB, land in the LTQ and
    // then take turns, one TRB period each
    begin
      int rr_before = n_rr;
      cycle(5'b11000, 400);
      while (pending[3] || pending[4]) cycle('0, 0);
      check("long tasks alternate round robin", n_rr > rr_before, 1);
    end
    repeat (10) cycle('0, 0);

    // random load
    for (int c = 0; c < 200_000; c++) begin
      logic [N-1:0] w;
      for (int k = 0; k < N; k++)
        w[k] = ($urandom_range(0, (k < 3) ? 120 : 900) == 0);
      cycle(w, 0);
    end

    // drain: no new events, everything accepted must complete
    all_idle = 0;
    for (int c = 0; c < 20_000 && all_idle < 10; c++) begin
      cycle('0, 0);
      if (cls[0] == CLS_IDLE && cls[1] == CLS_IDLE && cls[2] == CLS_IDLE &&
          cls[3] == CLS_IDLE && cls[4] == CLS_IDLE && !tvalid) all_idle++;
    end
    check("all tasks idle after the drain", all_idle, 10);
    for (int k = 0; k < N; k++)
      check($sformatf("task %0d: all activations completed", k), completed[k], accepted[k]);

    $display("mechanisms: switches=%0d preemptions=%0d itq_dispatch=%0d promotions=%0d rr_handover=%0d running_state=%0d idle_state_queued=%0d idle_pipeline=%0d avg_updates=%0d",
             n_switch, n_preempt, n_itq_dispatch, n_promote, n_rr, n_rs,
             n_is_queued, n_idle_pipe, n_avg);
    check("switch happened", n_switch > 0, 1);
    check("preemption happened", n_preempt > 0, 1);
    check("ITQ dispatch happened", n_itq_dispatch > 0, 1);
    check("TRB promotion happened", n_promote > 0, 1);
    check("round-robin hand-over happened", n_rr > 0, 1);
    check("Running State seen", n_rs > 0, 1);
    check("Idle State with queued tasks seen", n_is_queued > 0, 1);
    check("idle pipeline seen", n_idle_pipe > 0, 1);
    check("average updates seen", n_avg > 0, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
