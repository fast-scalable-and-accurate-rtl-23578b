// qp_scheduler_tb: a 16-QP scheduler with a 5-level heap. Checks the
// adaptive batch (25 Gb/s with 1 KB packets gives 3 WQEs; a small batch is
// cut to the WQEs posted; a large one to MAX_BATCH), the reciprocal rate,
// that a flow is fetched at once when it wakes, and that rescheduled flows
// are fetched in the order of their keys, each no earlier than one
// scheduling latency before its key and promptly after that. It also checks
// the sum of active rates, that a flow with no WQEs left or a rate of 0
// stays out of the heap, and that a queued flow whose rate drops to 0 goes
// idle when it reaches the root instead of being fetched.
module qp_scheduler_tb;
  import tassel_pkg::*;
  localparam int LAT = 250;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ts_t now; tsf_t now_f;
  logic ev_valid, ev_ready, fetch_valid, fetch_ready, init_done, ev_sched;
  event_t ev;
  logic [15:0] fetch_qpn; idx_t fetch_idx; logic [7:0] fetch_nwqe; tsf_t fetch_start;
  logic [31:0] fetch_off; inv_t fetch_inv; logic [35:0] rate_sum;

  qp_scheduler #(.NUM_QPS(16), .HEAP_LEVELS(5), .SCHED_LAT(LAT), .MAX_BATCH(64)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) now <= now + 1'b1;
  assign now_f = {now, 8'h0};

  typedef struct { int qpn; int idx; int nwqe; inv_t inv; tsf_t start; ts_t t; logic [31:0] off; } f_t;
  f_t fetches[$];
  // handshakes are sampled just before the clock edge that takes them
  always @(negedge clk) begin
    #4;
    if (fetch_valid && fetch_ready)
      fetches.push_back('{int'(fetch_qpn), int'(fetch_idx), int'(fetch_nwqe), fetch_inv, fetch_start, now, fetch_off});
  end

  task automatic send(ev_kind_e k, int q, int idx = 0, int rate = 0, int size = 0,
                      ts_t key = 0, tsf_t start = 0, int off = 0);
    @(negedge clk);
    ev_valid = 1;
    ev = '{kind: k, qpn: 16'(q), idx: idx_t'(idx), rate: rate_t'(rate), size: len_t'(size),
           key: key, start: start, off: 32'(off)};
    do @(posedge clk); while (!ev_ready);
    @(negedge clk); ev_valid = 0;
  endtask

  task automatic wait_fetches(int n, int limit);
    int c; c = 0;
    while (fetches.size() < n && c < limit) begin @(posedge clk); c++; end
  endtask

  initial begin
    ev_valid = 0; ev = '0; fetch_ready = 1; now = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (init_done);

    // one flow at 25 Gb/s, 1 KB packets, 10 WQEs posted
    send(EV_RATE, 1, 0, 250_000, 1024);
    repeat (60) @(posedge clk);
    check(dut.ctx_mem[1].batch == 8'd3, "batch of a 25 Gb/s 1 KB flow is 3");
    check(fetches.size() == 0 && rate_sum == 0, "no fetch and no active rate without WQEs");
    send(EV_DOORBELL, 1, 10);
    wait_fetches(1, 20);
    check(fetches.size() == 1, "a flow that wakes is fetched at once");
    if (fetches.size() == 1) begin
      f_t f; f = fetches.pop_front();
      check(f.qpn == 1 && f.idx == 0 && f.nwqe == 3 && f.off == 0, "fetch of 3 WQEs from the ring start");
      check(f.inv == inv_t'((20000 << 16) / 250_000), "reciprocal rate");
      check(time_le(f.start[31:8], f.t) && ts_t'(f.t - f.start[31:8]) < 20, "a waking flow starts at the current time");
    end
    check(rate_sum == 36'd250_000, "active rate counted");

    // reschedule it one key in the future, then at the end of its WQEs
    begin
      ts_t key; key = now + ts_t'(1000);
      send(EV_RESCHED, 1, 3, 0, 0, key, {key, 8'h40}, 100);
      wait_fetches(1, 2000);
      if (fetches.size() == 1) begin
        f_t f; f = fetches.pop_front();
        check(!time_before(f.t, key - ts_t'(LAT)) && time_before(f.t, key - ts_t'(LAT) + ts_t'(12)),
              "fetched one scheduling latency before its key");
        check(f.idx == 3 && f.off == 100 && f.start == {key, 8'h40}, "fetch resumes at the new head");
      end else check(0, "rescheduled flow fetched");
      send(EV_RESCHED, 1, 10, 0, 0, now, now_f, 0);
      repeat (400) @(posedge clk);
      check(fetches.size() == 0, "a flow with no WQEs left is not fetched");
      check(rate_sum == 0, "an idle flow's rate leaves the sum");
    end

    // a batch cut to the WQEs posted, and one cut to MAX_BATCH
    send(EV_RATE, 10, 0, 1_000_000, 64);
    send(EV_DOORBELL, 10, 5);
    wait_fetches(1, 100);
    if (fetches.size() == 1) begin f_t f; f = fetches.pop_front(); check(f.nwqe == 5, "batch cut to the WQEs posted"); end
    else check(0, "flow 10 fetched");
    send(EV_RESCHED, 10, 5, 0, 0, now, now_f, 0);
    send(EV_DOORBELL, 10, 500);
    wait_fetches(1, 100);
    if (fetches.size() == 1) begin f_t f; f = fetches.pop_front(); check(f.nwqe == 64 && f.idx == 5, "batch cut to MAX_BATCH"); end
    else check(0, "flow 10 fetched again");
    send(EV_RESCHED, 10, 500, 0, 0, now, now_f, 0);

    // a rate of 0 keeps a flow out
    send(EV_RATE, 11, 0, 0, 1024);
    send(EV_DOORBELL, 11, 4);
    repeat (100) @(posedge clk);
    check(fetches.size() == 0, "a flow with rate 0 is not fetched");

    // a queued flow whose rate drops to 0 goes idle instead of being fetched
    begin
      logic [35:0] sum0; ts_t key;
      sum0 = rate_sum;
      send(EV_RATE, 12, 0, 250_000, 1024);
      send(EV_DOORBELL, 12, 20);
      wait_fetches(1, 200);
      check(fetches.size() == 1, "flow 12 fetched when it wakes");
      fetches.delete();
      key = now + ts_t'(1000);
      send(EV_RESCHED, 12, 3, 0, 0, key, {key, 8'h00}, 0);
      send(EV_RATE, 12, 0, 0, 1024);
      repeat (1500) @(posedge clk);
      check(fetches.size() == 0, "a queued flow stopped by a rate of 0 is not fetched");
      check(dut.ctx_mem[12].st == 2'd0, "the stopped flow is idle");
      check(rate_sum == sum0, "the stopped flow's rate leaves the sum");
    end

    // eight flows rescheduled with random keys come out in key order
    begin
      ts_t keys [16]; int order[$];
      for (int q = 2; q < 10; q++) begin send(EV_RATE, q, 0, 100_000, 1024); send(EV_DOORBELL, q, 100); end
      wait_fetches(8, 200);
      check(fetches.size() == 8, "eight waking flows fetched");
      fetches.delete();
      for (int q = 2; q < 10; q++) begin
        keys[q] = now + ts_t'(600 + $urandom % 3000);
        send(EV_RESCHED, q, 1, 0, 0, keys[q], {keys[q], 8'h0}, 0);
      end
      wait_fetches(8, 5000);
      check(fetches.size() == 8, "eight rescheduled flows fetched");
      for (int i = 0; i < fetches.size(); i++) begin
        int q; q = fetches[i].qpn;
        check(!time_before(fetches[i].t, keys[q] - ts_t'(LAT)) &&
              time_before(fetches[i].t, keys[q] - ts_t'(LAT) + ts_t'(40)), $sformatf("flow %0d fetched on time", q));
        if (i > 0) check(time_le(keys[fetches[i-1].qpn], keys[q]), "fetched in key order");
        check(fetches[i].nwqe == 1, "batch of a 10 Gb/s flow is 1");
      end
      check(rate_sum == 36'd800_000, "eight active 10 Gb/s flows in the rate sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
