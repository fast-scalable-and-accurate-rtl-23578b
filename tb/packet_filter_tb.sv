// packet_filter_tb: streams of packets (as made by the time calculator) with
// start times before, inside and beyond the one-latency window are offered
// with random WQE-buffer and timing-wheel back-pressure. Imminent packets
// must be written to the buffer and the wheel together; the first distant
// packet raises stop and becomes the reschedule record (key, start, position);
// the packets after it are dropped; a fetch whose packets were all imminent
// is rescheduled at the current time with the position after its last packet.
module packet_filter_tb;
  import tassel_pkg::*;
  localparam int W = 250;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ts_t now;
  logic in_valid, in_ready, in_end, stop, buf_avail, buf_alloc, whl_valid, whl_ready;
  logic rs_valid, rs_ready, ev_imminent, ev_distant;
  pkt_desc_t in_desc, buf_desc; tsf_t in_s, in_f, rs_start; logic [31:0] in_off, rs_off;
  logic [6:0] buf_handle, whl_handle; ts_t buf_finish, whl_start, rs_key;
  logic [15:0] rs_qpn; idx_t rs_idx;

  packet_filter #(.WINDOW(W), .HW(7)) dut (.*);

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

  int n_imm = 0, n_dist = 0, n_drop = 0, n_all = 0;

  initial begin
    now = ts_t'(24'hFFFE00);
    in_valid = 0; in_end = 0; in_desc = '0; in_s = 0; in_f = 0; in_off = 0;
    buf_avail = 1; buf_handle = 0; whl_ready = 1; rs_ready = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 300; f++) begin
      int np; tsf_t s; bit seen; tsf_t d_s; idx_t d_idx; logic [31:0] d_off;
      logic [15:0] q;
      np = 1 + $urandom % 6; q = 16'($urandom); seen = 0;
      s = {now - ts_t'(50) + ts_t'($urandom % 300), 8'($urandom)};
      for (int p = 0; p <= np; p++) begin
        bit imm, last, acc; tsf_t f_t;
        last = (p == np);
        f_t = s + tsf_t'(($urandom % 80) << 8);
        @(negedge clk);
        in_valid = 1; in_end = last; in_s = s; in_f = last ? s : f_t; in_off = 32'($urandom);
        in_desc = '{qpn: q, wqe_idx: idx_t'(f * 8 + p), addr: addr_t'($urandom), len: len_t'($urandom)};
        do begin
          buf_avail = ($urandom % 4) != 0; whl_ready = ($urandom % 4) != 0; rs_ready = ($urandom % 4) != 0;
          buf_handle = 7'($urandom);
          #1;
          imm = time_before(s[31:8], now + ts_t'(W));
          if (last) begin
            check(rs_valid && rs_qpn == q, "end marker gives a reschedule record");
            check(!buf_alloc && !whl_valid, "end marker is not a packet");
            if (seen) check(rs_key == d_s[31:8] && rs_start == d_s && rs_idx == d_idx && rs_off == d_off,
                            "rescheduled at the first distant packet");
            else      check(rs_key == now && rs_start == s && rs_idx == in_desc.wqe_idx && rs_off == in_off,
                            "all imminent: rescheduled now, after the last packet");
            check(stop == seen, "stop high after a distant packet");
          end else if (seen) begin
            check(stop && in_ready && !buf_alloc && !whl_valid, "packets after a distant one dropped");
          end else if (imm) begin
            check(whl_valid == buf_avail && in_ready == (buf_avail && whl_ready) && buf_alloc == in_ready,
                  "imminent packet waits for buffer and wheel");
            if (whl_valid) check(whl_start == s[31:8] && whl_handle == buf_handle && buf_finish == f_t[31:8] &&
                                 buf_desc == in_desc, "imminent packet written with its times");
          end else begin
            check(in_ready && !buf_alloc && !whl_valid && ev_distant, "distant packet not kept");
          end
          acc = in_ready;
          @(posedge clk);
          if (!acc) @(negedge clk);
        end while (!acc);
        if (!last) begin
          if (seen) n_drop++;
          else if (imm) n_imm++;
          else begin seen = 1; d_s = s; d_idx = in_desc.wqe_idx; d_off = in_off; n_dist++; end
        end else if (!seen) n_all++;
        s = f_t;
        #1 in_valid = 0;
      end
    end
    check(n_imm > 100 && n_dist > 50 && n_drop > 20 && n_all > 20, "all cases exercised");
    $display("imminent %0d distant %0d dropped %0d all-imminent %0d", n_imm, n_dist, n_drop, n_all);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
