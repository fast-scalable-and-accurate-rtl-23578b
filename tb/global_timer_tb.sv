// global_timer_tb: the timer must advance one tick per cycle while the sum of
// active rates is below the link rate, 1/Phi tick per cycle when it is above
// (checked for Phi = 2 and Phi = 1.5, within one tick for the rounding of the
// step), and stand still during a pause.
module global_timer_tb;
  import tassel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pause;
  logic [35:0] rate_sum;
  ts_t now; tsf_t now_f; logic [15:0] step_q;

  global_timer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // advance over n cycles, with the rate sum settled
  task automatic measure(int n, int expect_num, int expect_den, string what);
    ts_t t0;
    int adv, want;
    repeat (200) @(posedge clk);    // let the divider settle
    @(negedge clk); t0 = now;
    repeat (n) @(posedge clk);
    @(negedge clk);
    adv = 32'(ts_t'(now - t0)); want = n * expect_num / expect_den;
    check(adv >= want - 1 && adv <= want + 1,
          $sformatf("%s: advanced %0d ticks in %0d cycles", what, ts_t'(now - t0), n));
  endtask

  initial begin
    pause = 0; rate_sum = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(100, 1, 1, "idle link, real time");
    check(step_q == 16'd256, "step is 1.0 with no active flows");
    rate_sum = 36'd600_000;          // 60 % of the link
    measure(100, 1, 1, "under-subscribed, real time");
    rate_sum = 36'd2_000_000;        // Phi = 2
    measure(100, 1, 2, "Phi = 2");
    check(step_q == 16'd128, "step is 0.5 at Phi = 2");
    rate_sum = 36'd1_500_000;        // Phi = 1.5
    measure(100, 2, 3, "Phi = 1.5");
    check(step_q == 16'd170, "step is 1/1.5 at Phi = 1.5");
    begin
      ts_t t0;
      @(negedge clk); pause = 1;
      @(negedge clk); t0 = now;
      repeat (50) @(posedge clk);
      @(negedge clk);
      check(now == t0, "time stands still during a pause");
      pause = 0;
    end
    measure(100, 2, 3, "after the pause");
    rate_sum = 36'd1_000_000;        // exactly the link rate
    measure(100, 1, 1, "Phi = 1, real time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
