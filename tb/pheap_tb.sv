// pheap_tb: random enqueues and dequeues on a small pipelined heap (5
// levels, 31 entries) checked against a reference multiset. Every dequeue
// must return the smallest key held; the heap size, the full flag and the
// issue interval of four cycles are checked too. Keys are kept within a
// window so that the wrapping comparison is well defined.
module pheap_tb;
  import tassel_pkg::*;
  localparam int LV = 5;
  localparam int CAP = (1 << LV) - 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic op_ready, enq, deq, root_valid, full;
  ts_t enq_key, root_key;
  logic [15:0] enq_qpn, root_qpn;
  logic [LV-1:0] count;

  pheap #(.LEVELS(LV), .ISSUE_INTERVAL(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  ts_t model[$];
  ts_t base;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_issue, n_enq, n_deq;
    enq = 0; deq = 0; enq_key = 0; enq_qpn = 0; base = ts_t'(24'hFFF000);  // near wrap
    last_issue = -100; n_enq = 0; n_deq = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (op_ready);
    for (int it = 0; it < 1500; it++) begin
      @(negedge clk);
      if (op_ready) begin
        check(root_valid == (model.size() > 0), "root_valid matches occupancy");
        check(32'(count) == model.size(), "count matches occupancy");
        check(full == (model.size() == CAP), "full flag");
        if (model.size() > 0) begin
          ts_t m; int mi; m = model[0]; mi = 0;
          foreach (model[k]) if (time_before(model[k], m)) begin m = model[k]; mi = k; end
          check(root_key == m, $sformatf("root is the minimum (%0h vs %0h)", root_key, m));
        end
        if (last_issue >= 0) check(int'($time / 10) - last_issue >= 4, "at most one operation per four cycles");
        if (!full && (model.size() == 0 || ($urandom % 100) < (it < 700 ? 65 : 35))) begin
          enq = 1; enq_key = base + ts_t'($urandom % 5000); enq_qpn = 16'($urandom);
          model.push_back(enq_key);
          n_enq++;
        end else begin
          int mi; ts_t m; m = model[0]; mi = 0;
          foreach (model[k]) if (time_before(model[k], m)) begin m = model[k]; mi = k; end
          deq = 1;
          model.delete(mi);
          n_deq++;
        end
        last_issue = int'($time / 10);
        @(negedge clk);
        enq = 0; deq = 0;
      end else begin
        check(!root_valid, "root hidden while an operation is in flight");
      end
    end
    check(n_enq > 100 && n_deq > 100, "both operations exercised");
    $display("enqueues %0d dequeues %0d", n_enq, n_deq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
