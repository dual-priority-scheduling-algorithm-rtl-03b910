// tb_rr_timer - self-checking test of the Round Robin timer (TRB).
// Drives random run / restart patterns and random periods (including 0,
// which disables the timer) and compares the expiry pulse and the count,
// cycle by cycle, with a reference model: the count advances on executing
// cycles, restarts on a task start and expires after exactly `period`
// executing cycles.  Also checks the latency of a plain expiry directly.
module tb_rr_timer;
  import nmpra_pkg::*;

  localparam int unsigned CNT_W = 32;

  logic             clk = 1'b0;
  logic             rst_n;
  logic [CNT_W-1:0] period;
  logic             restart, run;
  logic             expire;
  logic [CNT_W-1:0] count;

  int checks = 0, failures = 0, expiries = 0;

  rr_timer #(.CNT_W(CNT_W)) dut (
    .clk(clk), .rst_n(rst_n), .period_i(period), .restart_i(restart),
    .run_i(run), .expire_o(expire), .count_o(count));

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // reference model
  longint unsigned m_cnt;
  bit              m_exp;

  initial begin
    int lat;
    rst_n = 1'b0; period = 32'd10; restart = 1'b0; run = 1'b0;
    m_cnt = 0; m_exp = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // plain expiry: 10 executing cycles after a restart
    restart <= 1'b1;
    @(posedge clk);
    restart <= 1'b0;
    run     <= 1'b1;
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
      #1;
    end while (!expire && lat < 40);
    check("expiry latency (executing cycles)", lat, 10);
    @(posedge clk);
    #1 check("expiry is one pulse", expire, 0);
    run <= 1'b0;
    restart <= 1'b1;
    @(posedge clk);
    restart <= 1'b0;
    @(posedge clk);

    // random stimulus against the model
    m_cnt = 0; m_exp = 0;
    for (int seg = 0; seg < 40; seg++) begin
      period <= (seg % 9 == 8) ? '0 : CNT_W'($urandom_range(1, 40));
      for (int c = 0; c < 200; c++) begin
        logic r, s;
        r = ($urandom_range(0, 4) != 0);
        s = ($urandom_range(0, 60) == 0);
        run     <= r;
        restart <= s;
        @(posedge clk);
        // model update with the values sampled at this edge
        m_exp = 0;
        if (s) m_cnt = 0;
        else if (r && period != 0) begin
          if (m_cnt + 1 >= period) begin m_cnt = 0; m_exp = 1; end
          else m_cnt = m_cnt + 1;
        end
        #1;
        check("count", count, m_cnt);
        check("expire", expire, m_exp);
        if (expire) expiries++;
      end
    end
    checks++;
    if (expiries == 0) begin
      failures++;
      $display("FAIL no expiry seen");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
