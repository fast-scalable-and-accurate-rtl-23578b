// tassel_top_tb: end-to-end test of the rate limiter at its default size
// (16 K QPs, 1 us scheduling latency, 100 Gb/s link at 250 MHz).
//
// A behavioural host/DMA model answers every WQE fetch after DMA_LAT cycles
// with the requested WQEs, in order; each QP has a fixed message size. The
// transmit side is ready except during the pause. The test runs four phases and measures the
// rate each flow achieves from the transmit times:
//   A  one flow at 25 Gb/s with 1 KB messages: the adaptive batch must be 3
//      WQEs and the rate within 2 % of the limit;
//   B  four flows (25, 10, 1 and 40 Gb/s, the last with 8 KB messages that
//      span 8 packets): every flow within 3 % of its limit;
//   C  four more flows at 40 Gb/s oversubscribe the link: the timer must slow
//      down (Phi > 1), no flow may starve, the link must stay near full and
//      every flow must get about the same fraction 1/Phi of its limit;
//   D  a PFC pause (timer paused, transmit port not ready): the system time
//      must stand still, nothing may be sent, and sending must resume after.
// It also counts how often each mechanism happened (scheduling, batching,
// imminent and distant packets, waits for the link, oversubscription, pause,
// multi-packet messages) and fails any that never did.
module tassel_top_tb;
  import tassel_pkg::*;

  localparam int DMA_LAT = 200;      // cycles from request to first WQE
  localparam int NQ = 16;            // QPs used by the test

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;              // 4 ns

  logic pfc_pause;
  logic db_valid, db_ready; logic [15:0] db_qpn; idx_t db_pi;
  logic cc_valid, cc_ready; logic [15:0] cc_qpn; rate_t cc_rate; len_t cc_size;
  logic dma_req_valid, dma_req_ready; logic [15:0] dma_req_qpn; idx_t dma_req_idx;
  logic [7:0] dma_req_nwqe;
  logic wqe_valid, wqe_ready; wqe_t wqe;
  logic tx_ready, tx_valid; pkt_desc_t tx_desc; ts_t tx_finish, tx_time, now;
  logic ready; logic [15:0] timer_step; logic [4:0] events;

  tassel_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- host / DMA model ----------------
  int unsigned msg_size [NQ];
  typedef struct { longint due; int qpn; int idx; int n; } req_t;
  req_t reqs[$];
  int   cur_left = 0, cur_qpn = 0, cur_idx = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  assign dma_req_ready = 1'b1;
  // handshakes are sampled half a cycle after the falling edge, just before
  // the rising edge that takes them
  logic req_hs = 1'b0, wqe_hs = 1'b0;
  always @(negedge clk) begin
    #1;
    req_hs = dma_req_valid && dma_req_ready;
    wqe_hs = wqe_valid && wqe_ready;
    if (req_hs) begin
      req_t r;
      r.due = cyc + DMA_LAT; r.qpn = int'(dma_req_qpn); r.idx = int'(dma_req_idx);
      r.n = int'(dma_req_nwqe);
      reqs.push_back(r);
    end
  end
  always_comb begin
    wqe_valid = cur_left > 0;
    wqe.addr  = addr_t'({16'(cur_qpn), 16'(cur_idx), 16'h0});
    wqe.msg_len = msg_size[cur_qpn % NQ];
  end
  always @(posedge clk) begin
    if (wqe_hs) begin
      cur_left <= cur_left - 1;
      cur_idx  <= cur_idx + 1;
    end else if (cur_left == 0 && reqs.size() > 0 && reqs[0].due <= cyc) begin
      cur_left <= reqs[0].n; cur_qpn <= reqs[0].qpn; cur_idx <= reqs[0].idx;
      void'(reqs.pop_front());
    end
  end

  // ---------------- transmit monitor ----------------
  longint bytes [NQ];
  longint first_t [NQ];
  longint last_t [NQ];
  int     pkts [NQ];
  int     partial_pkts = 0;
  always @(negedge clk) begin
    #1;
    if (tx_valid) begin
      int q; q = int'(tx_desc.qpn) % NQ;
      if (pkts[q] == 0) first_t[q] = cyc;
      last_t[q] = cyc;
      bytes[q] += longint'(tx_desc.len);
      pkts[q]++;
      if (tx_desc.addr[15:0] != 0) partial_pkts++;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_sched = 0, n_batch = 0, n_imm = 0, n_dist = 0, n_wait = 0, n_elig = 0;
  int n_over = 0, n_pause = 0, n_allimm = 0, n_drain = 0;
  always @(negedge clk) begin
    #1;
    if (events[0]) n_sched++;
    if (events[1]) n_imm++;
    if (events[2]) n_dist++;
    if (events[3]) n_elig++;
    if (events[4]) n_wait++;
    if (dma_req_valid && dma_req_nwqe > 1) n_batch++;
    if (timer_step < 16'd256) n_over++;
    if (pfc_pause) n_pause++;
    if (dut.u_pkt.rs_valid && dut.u_pkt.rs_ready && !dut.u_pkt.u_filter.seen_q) n_allimm++;
    if (dut.u_pkt.u_calc.st == dut.u_pkt.u_calc.DRAIN) n_drain++;
  end

  // ---------------- stimulus helpers ----------------
  task automatic set_rate(int q, int rate_units, int size);
    @(negedge clk);
    cc_valid = 1; cc_qpn = 16'(q); cc_rate = rate_t'(rate_units); cc_size = len_t'(size);
    do @(posedge clk); while (!cc_ready);
    @(negedge clk); cc_valid = 0;
  endtask
  task automatic doorbell(int q, int pi);
    @(negedge clk);
    db_valid = 1; db_qpn = 16'(q); db_pi = idx_t'(pi);
    do @(posedge clk); while (!db_ready);
    @(negedge clk); db_valid = 0;
  endtask
  task automatic clear_stats();
    for (int q = 0; q < NQ; q++) begin bytes[q] = 0; pkts[q] = 0; end
  endtask
  // achieved rate in Gb/s over the measured window
  function automatic real gbps(int q);
    if (pkts[q] < 2) return 0.0;
    // bytes of all but the last packet over the time between first and last
    return real'(bytes[q] - bytes[q] / pkts[q]) * 8.0 / (real'(last_t[q] - first_t[q]) * 4.0);
  endfunction

  initial begin
    #40_000_000;   // watchdog: 10 M cycles
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r, ratio [NQ], rmin, rmax, total;
    pfc_pause = 0; db_valid = 0; cc_valid = 0; tx_ready = 1;
    db_qpn = 0; db_pi = 0; cc_qpn = 0; cc_rate = 0; cc_size = 0;
    for (int q = 0; q < NQ; q++) msg_size[q] = 1024;
    msg_size[4] = 8192;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (ready);
    repeat (10) @(posedge clk);

    // ---- phase A: one flow at 25 Gb/s ----
    set_rate(1, 250_000, 1024);
    repeat (60) @(posedge clk);
    check(dut.u_qps.ctx_mem[1].batch == 8'd3, "adaptive batch of a 25 Gb/s 1 KB flow is 3");
    doorbell(1, 4000);
    repeat (2000) @(posedge clk);
    clear_stats();
    repeat (40000) @(posedge clk);
    r = gbps(1);
    $display("phase A: qp1 %0.3f Gb/s, %0d packets", r, pkts[1]);
    check(r > 24.5 && r < 25.5, "phase A: 25 Gb/s flow within 2 %");

    // ---- phase B: four flows under the link rate ----
    set_rate(2, 100_000, 1024);
    set_rate(3, 10_000, 1024);
    set_rate(4, 400_000, 1024);
    doorbell(2, 4000);
    doorbell(3, 4000);
    doorbell(4, 4000);
    repeat (3000) @(posedge clk);
    clear_stats();
    repeat (60000) @(posedge clk);
    $display("phase B: %0.3f %0.3f %0.3f %0.3f Gb/s", gbps(1), gbps(2), gbps(3), gbps(4));
    check(gbps(1) > 24.25 && gbps(1) < 25.75, "phase B: 25 Gb/s flow within 3 %");
    check(gbps(2) > 9.7 && gbps(2) < 10.3, "phase B: 10 Gb/s flow within 3 %");
    check(gbps(3) > 0.97 && gbps(3) < 1.03, "phase B: 1 Gb/s flow within 3 %");
    check(gbps(4) > 38.8 && gbps(4) < 41.2, "phase B: 40 Gb/s 8 KB-message flow within 3 %");
    check(timer_step == 16'd256, "phase B: timer at real time while not oversubscribed");

    // ---- phase C: oversubscription ----
    for (int q = 5; q <= 8; q++) begin set_rate(q, 400_000, 1024); doorbell(q, 8000); end
    repeat (3000) @(posedge clk);
    check(timer_step < 16'd256, "phase C: timer slows down when oversubscribed");
    $display("phase C: timer step %0d/256", timer_step);
    clear_stats();
    repeat (60000) @(posedge clk);
    total = 0; rmin = 10; rmax = 0;
    begin
      int lim [9];
      lim = '{0, 250, 100, 10, 400, 400, 400, 400, 400};
      for (int q = 1; q <= 8; q++) begin
        ratio[q] = gbps(q) / (real'(lim[q]) / 10.0);
        total += gbps(q);
        if (ratio[q] < rmin) rmin = ratio[q];
        if (ratio[q] > rmax) rmax = ratio[q];
        $display("phase C: qp%0d %0.3f Gb/s = %0.3f of its limit", q, gbps(q), ratio[q]);
      end
    end
    // every flow should get the same fraction 1/Phi of its limit
    $display("phase C: fraction of the limit from %0.3f to %0.3f", rmin, rmax);
    check(rmin > 0.1, "phase C: no flow starved when oversubscribed");
    check(rmax - rmin < 0.03, "phase C: link shared in proportion to the limits");
    check(total > 90.0 && total < 101.0, "phase C: link nearly full when oversubscribed");

    // ---- phase D: PFC pause ----
    begin
      ts_t t0; int p0;
      // the pause holds both the timer and the transmit port
      @(negedge clk); pfc_pause = 1; tx_ready = 0;
      repeat (50) @(posedge clk);
      t0 = now; p0 = 0;
      for (int q = 0; q < NQ; q++) p0 += pkts[q];
      repeat (2000) @(posedge clk);
      check(now == t0, "phase D: time stands still during a pause");
      begin
        int p1; p1 = 0;
        for (int q = 0; q < NQ; q++) p1 += pkts[q];
        check(p1 == p0, "phase D: nothing sent during a pause");
      end
      @(negedge clk); pfc_pause = 0; tx_ready = 1;
      repeat (3000) @(posedge clk);
      begin
        int p2; p2 = 0;
        for (int q = 0; q < NQ; q++) p2 += pkts[q];
        check(p2 > p0 + 50, "phase D: sending resumes after the pause");
      end
    end

    $display("mechanisms: sched=%0d batch>1=%0d imminent=%0d distant=%0d eligible=%0d",
             n_sched, n_batch, n_imm, n_dist, n_elig);
    $display("            link-wait=%0d oversub=%0d pause=%0d all-imminent=%0d drain=%0d partial=%0d",
             n_wait, n_over, n_pause, n_allimm, n_drain, partial_pkts);
    check(n_sched > 0, "flows were scheduled");
    check(n_batch > 0, "adaptive batching fetched more than one WQE");
    check(n_imm > 0, "imminent packets kept");
    check(n_dist > 0, "distant packets dropped");
    check(n_elig > 0, "packets became eligible");
    check(n_wait > 0, "packets waited for the link");
    check(n_over > 0, "oversubscription slowed the timer");
    check(n_pause > 0, "a PFC pause happened");
    check(n_allimm > 0, "a fetch with only imminent packets was rescheduled at once");
    check(n_drain > 0, "WQEs after a distant packet were skipped");
    check(partial_pkts > 0, "packets from inside multi-packet messages were sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
