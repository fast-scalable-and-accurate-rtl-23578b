// register_array_tb: random inserts and removals on an 8-entry array checked
// against a reference list: the head is always the smallest key held (ties in
// insertion order), the count and full flag are right, each operation takes
// two cycles, an enqueue and a dequeue offered together are done in one
// operation (also when the array is full), and keys near the 24-bit wrap
// compare correctly.
module register_array_tb;
  import tassel_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enq_valid, enq_ready, head_valid, deq, full;
  ts_t enq_key, head_key;
  logic [6:0] enq_handle, head_handle;
  logic [3:0] count;

  register_array #(.DEPTH(D), .HW(7)) dut (.*);

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

  typedef struct { ts_t key; logic [6:0] h; } e_t;
  e_t model[$];

  initial begin
    int n_full, n_both, op; n_full = 0; n_both = 0;
    enq_valid = 0; deq = 0; enq_key = 0; enq_handle = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      check(head_valid == (model.size() > 0), "head valid when not empty");
      check(32'(count) == model.size(), "count");
      check(full == (model.size() == D), "full flag");
      if (full) n_full++;
      if (model.size() > 0)
        check(head_key == model[0].key && head_handle == model[0].h,
              $sformatf("head is the smallest key (%0h/%0d vs %0h/%0d)", head_key, head_handle, model[0].key, model[0].h));
      op = $urandom % 100;
      if (model.size() > 0 && op < 30) begin
        // enqueue and dequeue together, allowed even when full
        e_t e; int pos;
        e.key = ts_t'(24'hFFFF00 + ($urandom % 512)); e.h = 7'($urandom);
        enq_valid = 1; enq_key = e.key; enq_handle = e.h; deq = 1;
        #1 check(enq_ready, "ready for an enqueue with a dequeue, even when full");
        void'(model.pop_front());
        pos = model.size();
        foreach (model[k]) if (time_before(e.key, model[k].key)) begin pos = k; break; end
        model.insert(pos, e);
        n_both++;
      end else if (!full && (model.size() == 0 || op < (it % 500 < 250 ? 80 : 55))) begin
        e_t e; int pos;
        e.key = ts_t'(24'hFFFF00 + ($urandom % 512)); e.h = 7'($urandom);
        enq_valid = 1; enq_key = e.key; enq_handle = e.h;
        check(enq_ready, "ready when idle and not full");
        pos = model.size();
        foreach (model[k]) if (time_before(e.key, model[k].key)) begin pos = k; break; end
        model.insert(pos, e);
      end else begin
        deq = 1; void'(model.pop_front());
      end
      @(negedge clk); enq_valid = 0; deq = 0;
      check(!head_valid && !enq_ready, "busy in the shift cycle");
    end
    check(n_full > 0 && n_both > 100, "the array was filled; combined operations done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
