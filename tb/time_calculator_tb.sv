// time_calculator_tb: random fetch contexts (1 to 4 WQEs, messages of 1 byte
// to 5 KB, starting at a random offset in the first message) are fed with
// their WQEs, with random stalls on both sides. Every packet is checked
// against a reference: MTU-sized cuts, ring index, address, and the WF2Q+
// times S_0 = S_flow, S_j = F_(j-1), F_j = S_j + L_j * inv. Each fetch must
// end with one end marker giving the next position and start time. In some
// fetches the testbench raises stop after a packet, as the packet filter
// does: no further packet may appear and the remaining WQEs must be drained.
module time_calculator_tb;
  import tassel_pkg::*;
  localparam int MTU = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ctx_valid, ctx_ready, wqe_valid, wqe_ready, pkt_valid, pkt_ready, pkt_end, stop;
  logic [15:0] ctx_qpn; idx_t ctx_idx; logic [7:0] ctx_nwqe; tsf_t ctx_start;
  logic [31:0] ctx_off, pkt_off; inv_t ctx_inv; wqe_t wqe;
  pkt_desc_t pkt_desc; tsf_t pkt_s, pkt_f;

  time_calculator #(.MTU(MTU)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { idx_t idx; addr_t addr; len_t len; tsf_t s; tsf_t f; logic [31:0] off; } exp_t;

  int n_pkts = 0, n_stops = 0, n_multi = 0;

  initial begin
    ctx_valid = 0; wqe_valid = 0; pkt_ready = 0; stop = 0; wqe = '0;
    ctx_qpn = 0; ctx_idx = 0; ctx_nwqe = 0; ctx_start = 0; ctx_off = 0; ctx_inv = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 300; f++) begin
      exp_t exp_q[$];
      wqe_t wqes[$];
      int   nw, stop_after, got, wq_sent;
      tsf_t s; idx_t ix; logic [31:0] off;
      exp_q.delete(); wqes.delete();
      nw = 1 + $urandom % 4;
      ctx_qpn = 16'($urandom); ctx_idx = idx_t'($urandom); ctx_nwqe = 8'(nw);
      ctx_start = tsf_t'($urandom); ctx_inv = inv_t'(1 + $urandom % (1 << 20));
      for (int w = 0; w < nw; w++) begin
        wqe_t x; x.addr = addr_t'({$urandom, $urandom}); x.msg_len = 1 + $urandom % 5000;
        wqes.push_back(x);
      end
      ctx_off = (wqes[0].msg_len > 1) ? $urandom % wqes[0].msg_len : 0;
      // reference packets
      s = ctx_start; ix = ctx_idx; off = ctx_off;
      foreach (wqes[w]) begin
        while (off < wqes[w].msg_len) begin
          exp_t e; int l;
          l = (wqes[w].msg_len - off > MTU) ? MTU : wqes[w].msg_len - off;
          e.idx = ix; e.addr = wqes[w].addr + addr_t'(off); e.len = len_t'(l); e.off = off;
          e.s = s; e.f = s + tsf_t'((longint'(l) * longint'(ctx_inv)) >> 8);
          s = e.f; off += l;
          exp_q.push_back(e);
        end
        off = 0; ix++;
      end
      if (exp_q.size() > 1) n_multi++;
      stop_after = ($urandom % 3 == 0) ? int'($urandom % exp_q.size()) + 1 : -1;
      // hand over the context
      @(negedge clk); ctx_valid = 1;
      do @(posedge clk); while (!ctx_ready);
      @(negedge clk); ctx_valid = 0;
      got = 0; wq_sent = 0;
      fork
        begin   // DMA side
          while (wq_sent < nw) begin
            @(negedge clk);
            wqe_valid = ($urandom % 4) != 0; wqe = wqes[wq_sent];
            @(posedge clk);
            if (wqe_valid && wqe_ready) wq_sent++;
            #1 wqe_valid = 0;
          end
        end
        begin   // filter side
          bit done; done = 0;
          while (!done) begin
            @(negedge clk);
            pkt_ready = ($urandom % 4) != 0;
            @(posedge clk);
            if (pkt_valid && pkt_ready) begin
              if (pkt_end) begin
                if (stop_after < 0) begin
                  check(pkt_desc.wqe_idx == ix && pkt_off == 0 && pkt_s == s, "end marker gives the next position and start");
                end
                check(stop_after >= 0 || got == exp_q.size(), "all packets before the end marker");
                done = 1;
              end else begin
                check(!stop, "no packet while stop is high");
                if (got < exp_q.size()) begin
                  exp_t e; e = exp_q[got];
                  check(pkt_desc.qpn == ctx_qpn && pkt_desc.wqe_idx == e.idx && pkt_desc.addr == e.addr &&
                        pkt_desc.len == e.len && pkt_off == e.off, $sformatf("packet %0d position and length", got));
                  check(pkt_s == e.s && pkt_f == e.f, $sformatf("packet %0d S %0h/%0h F %0h/%0h", got, pkt_s, e.s, pkt_f, e.f));
                end else check(0, "no extra packet");
                got++;
                n_pkts++;
                if (got == stop_after) begin #1 stop = 1; n_stops++; end
              end
            end
          end
          #1 stop = 0; pkt_ready = 0;
        end
      join
      check(wq_sent == nw, "every WQE taken, including the ones after a stop");
    end
    check(n_stops > 10 && n_multi > 10, "stops and multi-packet fetches exercised");
    $display("packets %0d, stopped fetches %0d", n_pkts, n_stops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
