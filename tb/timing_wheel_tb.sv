// timing_wheel_tb: a 16-slot wheel with 8 handles. Handles are inserted with
// start times from a little in the past to one wheel turn ahead of a system
// time that advances one tick per cycle, with stretches where it stands still. Every handle must come out once, never before its
// start time, and within a few cycles after it (one release per cycle).
module timing_wheel_tb;
  import tassel_pkg::*;
  localparam int SL = 16, P = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ts_t now;
  logic ins_valid, ins_ready, out_valid, out_ready;
  logic [2:0] ins_handle, out_handle;
  ts_t ins_start;
  logic [3:0] occupancy;

  timing_wheel #(.SLOTS(SL), .POOL(P)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit  held [P];
  ts_t start_of [P];
  int  n_out = 0, n_in = 0, n_past = 0, max_late = 0;
  logic frozen;

  always @(posedge clk) if (rst_n && !frozen) now <= now + 1'b1;

  // release monitor
  // sampled just before the clock edge that takes the handle
  always @(negedge clk) begin
    int late;
    #4;
    if (rst_n && out_valid && out_ready) begin
    check(held[out_handle], "released handle was inserted");
    check(time_le(start_of[out_handle], now), "not released before its start time");
    late = int'(ts_t'(now - start_of[out_handle]));
    if (late > max_late) max_late = late;
    held[out_handle] = 0;
    n_out++;
    end
  end

  initial begin
    now = '0;                  // the system time starts with the wheel at 0
    frozen = 0; ins_valid = 0; ins_handle = 0; ins_start = 0; out_ready = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      frozen = (it % 700) > 600;
      out_ready = ($urandom % 8) != 0;
      ins_valid = 0;
      if (($urandom % 3) == 0) begin
        int k; k = -1;
        for (int j = 0; j < P; j++) if (!held[j]) begin k = j; break; end
        if (k >= 0) begin
          int off; off = int'($urandom % (SL + 4)) - 4;
          ins_valid = 1; ins_handle = 3'(k); ins_start = now + ts_t'(off);
          #1;
          if (ins_ready) begin
            held[k] = 1; start_of[k] = ins_start; n_in++;
            if (off < 0) n_past++;
          end
          // refused only while the cursor is behind, waiting for a release
          if (off < SL && !ins_ready) check(dut.cur_time != now, "insert within one turn of the time accepted");
        end
      end
      @(posedge clk); #1; ins_valid = 0;
    end
    frozen = 0;
    repeat (100) @(posedge clk);
    @(negedge clk);
    check(n_out == n_in, $sformatf("every handle released once (%0d of %0d)", n_out, n_in));
    check(occupancy == 0, "wheel empty at the end");
    check(max_late <= 2 * P + 2, $sformatf("released promptly (latest %0d ticks)", max_late));
    check(n_past > 0, "start times already passed were accepted");
    $display("inserted %0d, past %0d, latest release %0d ticks", n_in, n_past, max_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
