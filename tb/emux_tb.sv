// emux_tb: doorbells, rate updates and reschedule records offered at once and
// at random must all come out as events, each with its fields intact, and
// under full load each source must be served in turn (round robin).
module emux_tb;
  import tassel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic db_valid, db_ready, cc_valid, cc_ready, rs_valid, rs_ready, ev_valid, ev_ready;
  logic [15:0] db_qpn, cc_qpn, rs_qpn;
  idx_t db_pi, rs_idx; rate_t cc_rate; len_t cc_size; ts_t rs_key; tsf_t rs_start;
  logic [31:0] rs_off;
  event_t ev;

  emux dut (.*);

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

  int sent [3], got [3], run_len, max_run;
  ev_kind_e last_kind;

  // handshakes are sampled just before the clock edge that takes them
  always @(negedge clk) if (rst_n) begin
    #4;
    if (db_valid && db_ready) sent[0]++;
    if (cc_valid && cc_ready) sent[1]++;
    if (rs_valid && rs_ready) sent[2]++;
    if (ev_valid && ev_ready) begin
      case (ev.kind)
        EV_DOORBELL: begin got[0]++; check(ev.qpn == ev.idx, "doorbell fields"); end
        EV_RATE:     begin got[1]++; check(ev.rate == rate_t'(ev.qpn) && ev.size == len_t'(ev.qpn), "rate fields"); end
        EV_RESCHED:  begin got[2]++; check(ev.key == ts_t'(ev.qpn) && ev.idx == idx_t'(ev.qpn) &&
                                           ev.off == 32'(ev.qpn) && ev.start == tsf_t'(ev.qpn), "reschedule fields"); end
        default: check(0, "known event kind");
      endcase
      run_len = (ev.kind == last_kind) ? run_len + 1 : 1;
      last_kind = ev.kind;
    end
  end

  initial begin
    db_valid = 0; cc_valid = 0; rs_valid = 0; ev_ready = 1; run_len = 0; max_run = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      bit all; all = it < 1000;
      @(negedge clk);
      if (!db_valid || db_ready) begin db_valid = all || $urandom % 2; db_qpn = 16'($urandom); db_pi = idx_t'(db_qpn); end
      if (!cc_valid || cc_ready) begin cc_valid = all || $urandom % 2; cc_qpn = 16'($urandom); cc_rate = rate_t'(cc_qpn); cc_size = len_t'(cc_qpn); end
      if (!rs_valid || rs_ready) begin
        rs_valid = all || $urandom % 2; rs_qpn = 16'($urandom);
        rs_key = ts_t'(rs_qpn); rs_idx = idx_t'(rs_qpn); rs_off = 32'(rs_qpn); rs_start = tsf_t'(rs_qpn);
      end
      ev_ready = all || ($urandom % 4 != 0);
      if (all && run_len > max_run) max_run = run_len;
    end
    @(negedge clk); db_valid = 0; cc_valid = 0; rs_valid = 0; ev_ready = 1;
    repeat (10) @(posedge clk);
    for (int k = 0; k < 3; k++) check(got[k] == sent[k] && sent[k] > 100, $sformatf("source %0d: %0d in, %0d out", k, sent[k], got[k]));
    check(max_run == 1, "round robin under full load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
