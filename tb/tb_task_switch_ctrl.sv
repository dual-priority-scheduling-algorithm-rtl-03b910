// tb_task_switch_ctrl - self-checking test of the task switch sequencer.
// A small cycle monitor records, for every clock, the state of the stall,
// restart and run lines; directed sequences then check:
//   - a new choice is followed by exactly three all-stalled cycles, one
//     restart cycle (processXresetstall / processXstartagain of the new
//     task only, SelectTask already on the new task) and execution from the
//     fifth clock edge on;
//   - every task but the executing one is stalled while a task executes;
//   - switching away from an unfinished task raises preempt_o, an ended
//     task does not; an ended task with nothing to follow leaves the
//     pipeline idle after the stall;
//   - a choice that changes during the stall is the one restarted;
//   - random choices keep these rules (checked every cycle).
module tb_task_switch_ctrl;
  import nmpra_pkg::*;

  localparam int unsigned N = 5;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              next_valid;
  logic [TASK_W-1:0] next_task;
  logic [N-1:0]      done;
  logic [TASK_W-1:0] sel;
  logic              cur_valid;
  logic [N-1:0]      run, stall, rstall, sagain;
  logic              start, preempt, switching;

  int checks = 0, failures = 0;

  task_switch_ctrl #(.NTASKS(N), .SWITCH_WAIT(3)) dut (
    .clk(clk), .rst_n(rst_n), .next_valid_i(next_valid), .next_task_i(next_task),
    .done_i(done), .select_task_o(sel), .cur_valid_o(cur_valid), .run_o(run),
    .stall_o(stall), .resetstall_o(rstall), .startagain_o(sagain),
    .start_o(start), .preempt_o(preempt), .switching_o(switching));

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Issue a new choice, then follow the switch edge by edge.
  task automatic switch_to(input int t, input bit exp_preempt);
    logic [N-1:0] others;
    next_valid <= 1'b1;
    next_task  <= TASK_W'(t);
    #1 check("preempt flag on switch request", preempt, exp_preempt);
    @(posedge clk);                     // edge A
    for (int c = 0; c < 3; c++) begin
      #1;
      check("all stalled during wait", stall, {N{1'b1}});
      check("nothing runs during wait", run, 0);
      check("no restart during wait", sagain, 0);
      @(posedge clk);
    end
    #1;                                 // after edge A+3: restart cycle
    check("restart: startagain one-hot", sagain, 1 << t);
    check("restart: resetstall one-hot", rstall, 1 << t);
    check("restart: SelectTask", sel, t);
    check("restart: start pulse", start, 1);
    check("restart: still stalled", stall, {N{1'b1}});
    @(posedge clk);                     // edge A+4: executes
    #1;
    check("new task executes", run, 1 << t);
    others = ~(N'(1) << t);
    check("others stalled", stall, others);
    check("restart pulse ended", sagain, 0);
    check("switch over", switching, 0);
  endtask

  initial begin
    rst_n = 1'b0; next_valid = 1'b0; next_task = '0; done = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    check("idle after reset: nothing runs", run, 0);
    check("idle after reset: all stalled", stall, {N{1'b1}});

    switch_to(1, 1'b0);                 // from the idle pipeline
    repeat (4) @(posedge clk);
    #1 check("task 1 keeps running", run, 5'b00010);
    switch_to(3, 1'b1);                 // preemption of task 1
    switch_to(0, 1'b1);

    // task 0 ends, scheduler names task 4
    done       <= 5'b00001;
    next_task  <= 3'd4;
    #1 check("no preempt for an ended task", preempt, 0);
    @(posedge clk);
    done <= '0;
    #1 check("ended task released", cur_valid, 0);
    repeat (2) @(posedge clk);
    @(posedge clk);
    #1 check("restart of task 4 after the end of task 0", sagain, 5'b10000);
    @(posedge clk);
    #1 check("task 4 executes", run, 5'b10000);

    // task 4 ends with nothing else to run
    done       <= 5'b10000;
    next_valid <= 1'b0;
    @(posedge clk);
    done <= '0;
    repeat (3) @(posedge clk);
    #1;
    check("idle pipeline: no task owns it", cur_valid, 0);
    check("idle pipeline: no restart", sagain, 0);
    @(posedge clk);
    #1 check("idle pipeline: nothing runs", run, 0);

    // the choice changes during the stall: the later one wins
    next_valid <= 1'b1;
    next_task  <= 3'd2;
    @(posedge clk);
    next_task  <= 3'd3;
    repeat (3) @(posedge clk);
    #1 check("latest choice restarted", sagain, 5'b01000);
    @(posedge clk);

    // random choices, rules checked each cycle
    for (int c = 0; c < 3000; c++) begin
      if ($urandom_range(0, 7) == 0) begin
        next_valid <= ($urandom_range(0, 5) != 0);
        next_task  <= TASK_W'($urandom_range(0, N - 1));
      end
      done <= ($urandom_range(0, 9) == 0) ? N'(1) << $urandom_range(0, N - 1) : '0;
      @(posedge clk);
      #1;
      check("at most one task runs", $countones(run) <= 1, 1);
      check("runner not stalled", (run & stall) == 0, 1);
      check("restart only for the selected task",
            sagain == (start ? (N'(1) << sel) : N'(0)), 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
