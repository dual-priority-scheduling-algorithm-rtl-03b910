// tb_task_run_avg - self-checking test of the per-task execution-time
// registers.  Replays the seven activations of the averaging example
// (500, 700, 450, 900, 1000, 1200, 300 cycles) with random pauses inside
// each activation (a preempted task must not count) and checks the running
// count during an activation and the average after each one against the
// expected series 250, 475, 462, 681, 840, 1020, 660.  Then runs 200 random
// activations against a reference model of avg = (cnt + avg) >> 1, and
// checks the counter's saturation with a narrow instance.
module tb_task_run_avg;
  import nmpra_pkg::*;

  localparam int unsigned CNT_W = 32;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             run, done;
  logic [CNT_W-1:0] cnt, avg;

  // narrow instance for the saturation check
  logic             run_n, done_n;
  logic [3:0]       cnt_n, avg_n;

  int checks = 0, failures = 0;

  task_run_avg #(.CNT_W(CNT_W)) dut (
    .clk(clk), .rst_n(rst_n), .run_i(run), .done_i(done),
    .cnt_o(cnt), .avg_o(avg));

  task_run_avg #(.CNT_W(4)) dut_n (
    .clk(clk), .rst_n(rst_n), .run_i(run_n), .done_i(done_n),
    .cnt_o(cnt_n), .avg_o(avg_n));

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // one activation of n executed cycles, with pauses when gaps is set
  task automatic activation(input int unsigned n, input bit gaps);
    int unsigned done_cycles = 0;
    while (done_cycles < n) begin
      if (gaps && ($urandom_range(0, 3) == 0)) begin
        run  <= 1'b0;
        done <= 1'b0;
        @(posedge clk);
      end else begin
        done_cycles++;
        run  <= 1'b1;
        done <= (done_cycles == n);
        @(posedge clk);
        if (done_cycles == n / 2) begin
          #1 check("running count", cnt, n / 2);
        end
      end
    end
    run  <= 1'b0;
    done <= 1'b0;
    @(posedge clk);
    #1 check("count cleared", cnt, 0);
  endtask

  int unsigned table_run [7] = '{500, 700, 450, 900, 1000, 1200, 300};
  int unsigned table_avg [7] = '{250, 475, 462, 681, 840, 1020, 660};

  initial begin
    longint unsigned ref_avg;
    int unsigned     n;
    rst_n = 1'b0; run = 1'b0; done = 1'b0; run_n = 1'b0; done_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1 check("average after reset", avg, 0);

    // averaging example
    for (int i = 0; i < 7; i++) begin
      activation(table_run[i], 1'b1);
      check($sformatf("example step %0d average", i + 2), avg, table_avg[i]);
    end

    // random activations against a reference model
    ref_avg = avg;
    for (int i = 0; i < 200; i++) begin
      n = $urandom_range(1, 3000);
      activation(n, 1'b0);
      ref_avg = (ref_avg + n) >> 1;
      check("random average", avg, ref_avg);
    end

    // counter saturation at 15 in the 4-bit instance, then (15 + 0) >> 1
    run_n <= 1'b1;
    repeat (20) @(posedge clk);
    #1 check("saturated count", cnt_n, 15);
    done_n <= 1'b1;
    @(posedge clk);
    run_n <= 1'b0; done_n <= 1'b0;
    @(posedge clk);
    #1 check("average of saturated run", avg_n, 7);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
