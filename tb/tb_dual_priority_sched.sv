// tb_dual_priority_sched - self-checking test of the class bookkeeping and
// task selection.  The test plays the role of the switch sequencer (it
// decides which task is current, when one starts and when one is
// preempted).  A directed scenario checks the three classes by hand:
// shortest average first in the EMTQ, preemption into the ITQ, fixed
// priority in the ITQ once the EMTQ is empty, promotion to the LTQ on a
// TRB expiry and round robin among LTQ tasks.  A random phase then
// compares classes and choices, cycle by cycle, with a reference model.
module tb_dual_priority_sched;
  import nmpra_pkg::*;

  localparam int unsigned N     = 5;
  localparam int unsigned CNT_W = 32;

  logic              clk = 1'b0;
  logic              rst_n;
  logic [N-1:0]      ready, done;
  logic [CNT_W-1:0]  avg [N];
  logic              trb_expire;
  logic              cur_valid;
  logic [TASK_W-1:0] cur_task;
  logic              start, preempt;
  logic              next_valid;
  logic [TASK_W-1:0] next_task;
  logic              rs;
  task_class_e       cls [N];

  int checks = 0, failures = 0;

  dual_priority_sched #(.NTASKS(N), .CNT_W(CNT_W)) dut (
    .clk(clk), .rst_n(rst_n), .ready_i(ready), .done_i(done), .avg_i(avg),
    .trb_expire_i(trb_expire), .cur_valid_i(cur_valid), .cur_task_i(cur_task),
    .start_i(start), .preempt_i(preempt), .next_valid_o(next_valid),
    .next_task_o(next_task), .rs_o(rs), .class_o(cls));

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic idle_inputs();
    ready <= '0; done <= '0; trb_expire <= 1'b0; start <= 1'b0; preempt <= 1'b0;
  endtask

  task automatic step();
    @(posedge clk);
    idle_inputs();
    #1;
  endtask

  // make t the current task (the sequencer's restart)
  task automatic run_task(input int t);
    cur_valid <= 1'b1; cur_task <= TASK_W'(t); start <= 1'b1;
    step();
  endtask

  // ------------------------------------------------------ reference model
  int m_cls [N];     // 0 idle, 1 EMTQ, 2 ITQ, 3 LTQ
  int m_ptr;

  function automatic int model_next(output bit valid);
    int best = -1;
    valid = 1'b1;
    // EMTQ: smallest average, the current task wins a tie, then lowest index
    for (int k = 0; k < N; k++)
      if (m_cls[k] == 1) begin
        if (best < 0) best = k;
        else if (avg[k] < avg[best]) best = k;
        else if (avg[k] == avg[best] && cur_valid && cur_task == k) best = k;
      end
    if (best >= 0) return best;
    for (int k = 0; k < N; k++) if (m_cls[k] == 2) return k;
    for (int i = 0; i < N; i++) if (m_cls[(m_ptr + i) % N] == 3) return (m_ptr + i) % N;
    valid = 1'b0;
    return 0;
  endfunction

  task automatic model_edge(input logic [N-1:0] r, input logic [N-1:0] d,
                            input bit ex, input bit st, input bit pe,
                            input bit cv, input int ct);
    int old_cls [N];
    old_cls = m_cls;
    for (int k = 0; k < N; k++) begin
      bit is_cur = cv && (ct == k);
      if (d[k]) m_cls[k] = r[k] ? 1 : 0;
      else if (is_cur && ex && old_cls[k] != 3) m_cls[k] = 3;
      else if (is_cur && pe && old_cls[k] == 1) m_cls[k] = 2;
      else if (r[k] && old_cls[k] == 0) m_cls[k] = 1;
    end
    if (cv && ex) m_ptr = (ct + 1) % N;
    else if (st && old_cls[ct] == 3) m_ptr = ct;
  endtask

  initial begin
    bit v;
    int e;
    rst_n = 1'b0; cur_valid = 1'b0; cur_task = '0;
    idle_inputs();
    avg = '{32'd0, 32'd700, 32'd300, 32'd500, 32'd100};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    step();
    check("nothing queued after reset", next_valid, 0);
    check("Idle State after reset", rs, 0);

    // tasks 2 (avg 300) and 4 (avg 100) become active: 4 first
    ready <= 5'b10100;
    step();
    check("EMTQ: shortest average chosen", next_task, 4);
    check("Running State", rs, 1);
    check("task 2 in EMTQ", cls[2], CLS_EMTQ);
    run_task(4);
    // task 1 (avg 700) arrives: no preemption
    ready <= 5'b00010;
    step();
    check("longer task does not displace", next_task, 4);
    // task 3 gets a shorter average and arrives
    avg[3] = 32'd50;
    ready <= 5'b01000;
    step();
    check("shorter task displaces the running one", next_task, 3);
    preempt <= 1'b1;           // sequencer switches task 4 out
    step();
    check("preempted task goes to ITQ", cls[4], CLS_ITQ);
    run_task(3);
    done <= 5'b01000;          // task 3 ends
    step();
    check("ended task idle", cls[3], CLS_IDLE);
    check("next shortest in EMTQ", next_task, 2);
    run_task(2);
    done <= 5'b00100;
    step();
    check("EMTQ still holds task 1", next_task, 1);
    run_task(1);
    // task 1 overruns the TRB: promoted to LTQ
    trb_expire <= 1'b1;
    step();
    check("TRB expiry promotes to LTQ", cls[1], CLS_LTQ);
    check("Idle State: ITQ before LTQ", next_task, 4);
    check("Idle State flag", rs, 0);
    // task 0 becomes ready, preempting nothing else but ranks in EMTQ
    ready <= 5'b00001;
    step();
    check("new EMTQ task before ITQ and LTQ", next_task, 0);
    cur_valid <= 1'b0; // task 1 switched out (it stays in the LTQ)
    run_task(0);
    trb_expire <= 1'b1;
    step();
    check("second promotion", cls[0], CLS_LTQ);
    check("ITQ task next", next_task, 4);
    run_task(4);
    trb_expire <= 1'b1;
    step();
    check("ITQ task promoted too", cls[4], CLS_LTQ);
    // LTQ = {0, 1, 4}; pointer after task 4 -> 0
    check("round robin wraps to task 0", next_task, 0);
    run_task(0);
    check("restarted LTQ task keeps its turn", next_task, 0);
    trb_expire <= 1'b1;
    step();
    check("round robin: task 1 after task 0", next_task, 1);
    run_task(1);
    trb_expire <= 1'b1;
    step();
    check("round robin: task 4 after task 1", next_task, 4);
    run_task(4);
    done <= 5'b10000;
    step();
    check("LTQ task ends", cls[4], CLS_IDLE);

    // ---------------------------------------------------- random phase
    for (int k = 0; k < N; k++) m_cls[k] = int'(cls[k]);
    m_ptr = 0;
    // bring the model's pointer in line: restart task 0 (LTQ) explicitly
    run_task(0);
    m_ptr = 0;
    for (int c = 0; c < 5000; c++) begin
      logic [N-1:0] r, d;
      bit ex, st, pe, cv;
      int ct;
      if ($urandom_range(0, 20) == 0) avg[$urandom_range(0, N - 1)] = $urandom_range(0, 8);
      r  = ($urandom_range(0, 3) == 0) ? N'($urandom) : '0;
      cv = ($urandom_range(0, 9) != 0);
      ct = $urandom_range(0, N - 1);
      d  = ($urandom_range(0, 6) == 0) ? N'(1) << $urandom_range(0, N - 1) : '0;
      ex = ($urandom_range(0, 8) == 0);
      st = ($urandom_range(0, 8) == 0);
      pe = ($urandom_range(0, 8) == 0);
      ready <= r; done <= d; trb_expire <= ex; start <= st; preempt <= pe;
      cur_valid <= cv; cur_task <= TASK_W'(ct);
      #1;
      e = model_next(v);
      check("random: next valid", next_valid, v);
      if (v) check("random: next task", next_task, e);
      check("random: Running State", rs, (m_cls[0] == 1) || (m_cls[1] == 1) ||
            (m_cls[2] == 1) || (m_cls[3] == 1) || (m_cls[4] == 1));
      @(posedge clk);
      model_edge(r, d, ex, st, pe, cv, ct);
      #1;
      for (int k = 0; k < N; k++) check("random: class", int'(cls[k]), m_cls[k]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
