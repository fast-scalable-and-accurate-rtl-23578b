// packet_scheduler_tb: the packet-level tier on its own, at its default size,
// with the system time advancing one tick per cycle and a DMA model that
// answers each fetch context with its WQEs after a short delay.
//  1. a fetch whose packets all start within the window: every packet is sent
//     no earlier than its start time S, the finish times follow
//     F = S + L * inv, and the flow is rescheduled at once, after its last
//     packet;
//  2. a fetch that starts beyond the window: nothing is sent and the flow is
//     rescheduled at its start time;
//  3. a fetch with a distant packet in the middle: the packets before it are
//     sent, the rest are dropped and the flow resumes at the distant packet;
//  4. two packets that become eligible together while the link is busy leave
//     in finish-time order, not arrival order;
//  5. back-to-back packets are paced at the link rate (50 bytes per cycle);
//  6. 100-byte packets from four 100 Gb/s flows leave at line rate, one every
//     two cycles (125 Mpps).
module packet_scheduler_tb;
  import tassel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ts_t now;
  logic fc_valid, fc_ready, wqe_valid, wqe_ready, rs_valid, rs_ready, tx_ready, tx_valid;
  logic ev_imminent, ev_distant, ev_link_wait, ev_eligible;
  logic [15:0] fc_qpn, rs_qpn; idx_t fc_idx, rs_idx; logic [7:0] fc_nwqe;
  tsf_t fc_start, rs_start; logic [31:0] fc_off, rs_off; inv_t fc_inv;
  wqe_t wqe; ts_t rs_key, tx_finish, tx_time; pkt_desc_t tx_desc;

  packet_scheduler dut (.*);

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

  // DMA model: every WQE of a message of msg_len bytes
  int unsigned msg_len = 1024;
  int          wqe_left = 0, wqe_delay = 0;
  int          want[$];
  logic        fc_hs = 1'b0, wqe_hs = 1'b0, rs_hs = 1'b0;
  always @(negedge clk) begin
    #4;
    fc_hs = fc_valid && fc_ready; wqe_hs = wqe_valid && wqe_ready; rs_hs = rs_valid && rs_ready;
  end
  assign wqe_valid = wqe_left > 0 && wqe_delay == 0;
  assign wqe = '{addr: addr_t'(48'h1000_0000), msg_len: msg_len};
  always @(posedge clk) begin
    if (fc_hs) want.push_back(int'(fc_nwqe));
    if (wqe_hs) wqe_left <= wqe_left - 1;
    else if (wqe_left == 0 && want.size() > 0) begin wqe_left <= want.pop_front(); wqe_delay <= 20; end
    else if (wqe_delay > 0) wqe_delay <= wqe_delay - 1;
  end

  // monitors
  typedef struct { int qpn; int len; ts_t fin; ts_t t; int idx; } tx_t;
  tx_t sent[$];
  typedef struct { int qpn; ts_t key; tsf_t start; int idx; logic [31:0] off; } rs_t;
  rs_t res[$];
  always @(posedge clk) begin
    if (rs_hs) res.push_back('{int'(rs_qpn), rs_key, rs_start, int'(rs_idx), rs_off});
  end
  always @(negedge clk) if (tx_valid)
    sent.push_back('{int'(tx_desc.qpn), int'(tx_desc.len), tx_finish, tx_time, int'(tx_desc.wqe_idx)});

  task automatic fetch(int q, int idx, int n, tsf_t s, inv_t inv, int off = 0);
    @(negedge clk);
    fc_valid = 1; fc_qpn = 16'(q); fc_idx = idx_t'(idx); fc_nwqe = 8'(n); fc_start = s;
    fc_off = 32'(off); fc_inv = inv;
    do @(posedge clk); while (!fc_ready);
    @(negedge clk); fc_valid = 0;
  endtask

  task automatic settle(int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    fc_valid = 0; fc_qpn = 0; fc_idx = 0; fc_nwqe = 0; fc_start = 0; fc_off = 0; fc_inv = 0;
    rs_ready = 1; tx_ready = 1; now = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    settle(10);

    // 1. all imminent: 3 WQEs of 1 KB at 25 Gb/s (inv 5242: 81.9 ticks per KB)
    begin
      ts_t s0; tsf_t f;
      s0 = now + ts_t'(40);
      fetch(1, 0, 3, {s0, 8'h0}, inv_t'(5242));
      settle(600);
      check(sent.size() == 3, $sformatf("three packets sent (%0d)", sent.size()));
      f = {s0, 8'h0};
      foreach (sent[i]) begin
        tsf_t s; s = f;
        f = s + tsf_t'((1024 * 5242) >> 8);
        check(sent[i].fin == f[31:8], $sformatf("packet %0d finish time", i));
        check(time_le(s[31:8], sent[i].t), $sformatf("packet %0d not sent before its start", i));
        check(time_before(sent[i].t, s[31:8] + ts_t'(30)), $sformatf("packet %0d sent soon after its start", i));
        check(sent[i].idx == i, "packets in ring order");
      end
      check(res.size() == 1 && res[0].qpn == 1 && res[0].idx == 3 && res[0].start == f,
            "all-imminent fetch rescheduled after its last packet");
      sent.delete(); res.delete();
    end

    // 2. distant fetch
    begin
      ts_t s0; s0 = now + ts_t'(2000);
      fetch(2, 7, 2, {s0, 8'h80}, inv_t'(5242));
      settle(300);
      check(sent.size() == 0, "nothing of a distant fetch sent");
      check(res.size() == 1 && res[0].key == s0 && res[0].start == {s0, 8'h80} && res[0].idx == 7 && res[0].off == 0,
            "distant fetch rescheduled at its own start");
      sent.delete(); res.delete();
    end

    // 3. 8 KB messages at 1 Gb/s (inv 131072: 2 ticks per byte, 2048 per packet)
    //    from offset 0: the first packet is imminent, the second is not
    begin
      ts_t s0; s0 = now + ts_t'(20);
      msg_len = 8192;
      fetch(3, 4, 2, {s0, 8'h0}, inv_t'(131072));
      settle(300);
      check(sent.size() == 1 && sent.size() > 0 && sent[0].len == 1024, "only the imminent packet sent");
      check(res.size() == 1 && res[0].idx == 4 && res[0].off == 1024 && res[0].key == s0 + ts_t'(2048),
            "flow resumes at the first distant packet");
      msg_len = 1024;
      sent.delete(); res.delete();
    end

    // 4 and 5. a 1 KB packet holds the link; two packets become eligible
    //    together behind it: the one that finishes first must go first
    begin
      ts_t s0; s0 = now + ts_t'(60);
      fetch(4, 0, 1, {s0, 8'h0}, inv_t'(100));
      fetch(5, 0, 1, {s0 + ts_t'(2), 8'h0}, inv_t'(60000));   // F far
      fetch(6, 0, 1, {s0 + ts_t'(2), 8'h0}, inv_t'(3000));    // F near
      settle(400);
      check(sent.size() == 3, "three packets sent");
      if (sent.size() == 3) begin
        check(sent[0].qpn == 4 && sent[1].qpn == 6 && sent[2].qpn == 5, "eligible packets leave in finish-time order");
        check(int'(ts_t'(sent[1].t - sent[0].t)) >= 20 && int'(ts_t'(sent[1].t - sent[0].t)) <= 22,
              "a 1 KB packet holds a 100 Gb/s link for about 20.5 cycles");
      end
    end
    // 6. line rate with 100-byte packets: four flows at 100 Gb/s, 64 one-packet
    //    WQEs each; the link needs a packet every 2 cycles (125 Mpps)
    begin
      ts_t s0; int n, t_first, t_last;
      sent.delete(); res.delete();
      settle(200);
      msg_len = 100;
      s0 = now + ts_t'(50);
      for (int q = 10; q < 14; q++) fetch(q, 0, 64, {s0, 8'h0}, inv_t'(1310));
      settle(2000);
      n = sent.size();
      check(n == 256, $sformatf("all 256 small packets sent (%0d)", n));
      if (n > 20) begin
        // the first 128 come from the first two fetches, back to back (the DMA
        // model adds a gap between fetches)
        t_first = int'(sent[0].t); t_last = int'(sent[127].t);
        $display("small packets: 128 in %0d cycles, %0d in %0d", t_last - t_first, n, int'(sent[n-1].t) - t_first);
        check(t_last - t_first <= 2 * 127 + 2, "small packets leave at 125 Mpps (one per 2 cycles)");
      end
      msg_len = 1024;
    end
    check(ev_link_wait == 0 && dut.ra_count == 0, "scheduler empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
