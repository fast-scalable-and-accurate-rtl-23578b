// wqe_buffer_tb: fills a small buffer (8 entries), checks that handles are
// unique, that both read ports return what was written, that avail drops when
// full, and that freed handles are reused, over random alloc/free traffic.
module wqe_buffer_tb;
  import tassel_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic alloc_avail, alloc, free;
  logic [2:0] alloc_handle, rd0_handle, rd1_handle, free_handle;
  pkt_desc_t wr_desc, rd0_desc, rd1_desc;
  ts_t wr_finish, rd0_finish, rd1_finish;
  logic [3:0] in_use;

  wqe_buffer #(.DEPTH(D), .HW(3)) dut (.*);

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

  bit        held [D];
  pkt_desc_t m_desc [D];
  ts_t       m_fin [D];

  initial begin
    int n_held, n_full;
    alloc = 0; free = 0; wr_desc = '0; wr_finish = '0; rd0_handle = 0; rd1_handle = 0; free_handle = 0;
    n_held = 0; n_full = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      check(32'(in_use) == n_held, "in_use counts held entries");
      check(alloc_avail == (n_held < D), "avail until full");
      if (n_held == D) n_full++;
      // read two random held entries
      for (int k = 0; k < D; k++) if (held[k]) begin
        rd0_handle = 3'(k); rd1_handle = 3'(D - 1 - k);
        #1;
        check(rd0_desc == m_desc[k] && rd0_finish == m_fin[k], "read port 0 returns the entry");
        if (held[D-1-k]) check(rd1_desc == m_desc[D-1-k] && rd1_finish == m_fin[D-1-k], "read port 1 returns the entry");
        break;
      end
      if (alloc_avail && (n_held == 0 || ($urandom % 100) < (it % 400 < 200 ? 70 : 30))) begin
        check(!held[alloc_handle], "allocated handle is free");
        alloc = 1;
        wr_desc = '{qpn: 16'($urandom), wqe_idx: idx_t'($urandom), addr: addr_t'({$urandom, $urandom}), len: len_t'($urandom)};
        wr_finish = ts_t'($urandom);
        held[alloc_handle] = 1; m_desc[alloc_handle] = wr_desc; m_fin[alloc_handle] = wr_finish;
        n_held++;
      end else if (n_held > 0) begin
        int k; do k = $urandom % D; while (!held[k]);
        free = 1; free_handle = 3'(k); held[k] = 0; n_held--;
      end
      @(negedge clk); alloc = 0; free = 0;
    end
    check(n_full > 0, "the buffer was filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
