// qp_scheduler: tier 1 of the rate limiter, flow-level rate limiting.
//
// Holds the scheduling state of NUM_QPS queue pairs (flows) and keeps every
// flow that has WQEs to send in the pipelined heap, keyed by its scheduling
// time: the time its head packet may start. Whenever the heap root is due,
// that is its key is not after T + SCHED_LAT (the system time plus one
// typical scheduling latency, so the WQEs arrive in time), the flow is taken
// out and the DMA engine is asked for a batch of WQEs; the same request goes
// to the packet scheduler as a fetch context. The flow stays out of the heap
// until the packet scheduler sends its reschedule event back.
//
// Adaptive batching: the batch is the number of packets the flow may send in
// one scheduling latency, N = rate * latency / typical packet size, at least
// 1 and at most MAX_BATCH, and never more than the WQEs posted. With the rate
// in 100 kb/s units and 4 ns ticks this is
//     N = rate * SCHED_LAT / (size * 20000)
// (25 Gb/s, 1024 B, 1 us gives 3). N and the reciprocal rate used by the time
// calculator, 20000 * 2^16 / rate ticks per byte, are worked out with two
// sequential dividers when congestion control sets a rate, about 34 cycles.
//
// Events (from the event mux), one at a time:
//  * doorbell: new producer index; an idle flow with WQEs and a rate enters
//    the heap at max(its last start time, T), so idle time earns no burst;
//  * rate: new rate and typical size; the dividers run, and an idle flow
//    with WQEs enters the heap;
//  * reschedule: new head position and start time; the flow goes back into
//    the heap with the key given, or becomes idle if it has no WQEs left.
// A flow counts as active from entering the heap until it becomes idle; the
// sum of the rates of active flows (rate_sum) drives the timer's
// oversubscription factor. A rate of 0 keeps a flow out of the heap; a
// queued flow whose rate drops to 0 goes idle when it reaches the root.
//
// After reset the context memory is cleared, one QP per cycle (NUM_QPS
// cycles), before events are taken.
//
// The scheduling rule, the look-ahead by one scheduling latency, the batch
// formula and the rescheduling follow the paper; the state layout, the
// dividers and the order of work (a due flow before a pending event) are this
// design's choices.
module qp_scheduler
  import tassel_pkg::*;
#(
  parameter int unsigned NUM_QPS     = 16384,
  parameter int unsigned HEAP_LEVELS = 15,
  parameter int unsigned HEAP_ISSUE  = 4,
  parameter int unsigned SCHED_LAT   = 250,   // ticks (1 us)
  parameter int unsigned MAX_BATCH   = 64,
  parameter int unsigned SUM_W       = 36
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ts_t              now,
  input  tsf_t             now_f,
  // events from the event mux
  input  logic             ev_valid,
  output logic             ev_ready,
  input  event_t           ev,
  // WQE fetch request (to the DMA engine and the packet scheduler)
  output logic             fetch_valid,
  input  logic             fetch_ready,
  output logic [15:0]      fetch_qpn,
  output idx_t             fetch_idx,
  output logic [7:0]       fetch_nwqe,
  output tsf_t             fetch_start,
  output logic [31:0]      fetch_off,
  output inv_t             fetch_inv,
  // sum of the rates of the active flows (to the timer)
  output logic [SUM_W-1:0] rate_sum,
  output logic             init_done,
  output logic             ev_sched       // a flow was scheduled
);
  localparam int unsigned QW = $clog2(NUM_QPS);

  typedef enum logic [1:0] {F_IDLE, F_QUEUED, F_INFLIGHT} fstate_e;

  typedef struct packed {
    rate_t       rate;
    inv_t        inv;
    logic [7:0]  batch;
    tsf_t        start;   // start time of the head packet
    idx_t        ci;      // ring index of the head WQE
    idx_t        pi;      // producer index posted by the host
    logic [31:0] off;     // byte offset of the head packet in its message
    fstate_e     st;
  } qctx_t;

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_EVENT, S_DIV, S_PUSH, S_FETCH} st_e;

  qctx_t   ctx_mem [NUM_QPS];
  st_e     st;
  logic [QW-1:0] qpn_q, init_idx;
  event_t  ev_q;
  qctx_t   cur, nxt;
  logic    ctx_we;
  qctx_t   ctx_wd;
  ts_t     push_key_q;

  // heap
  logic    h_ready, h_enq, h_deq, h_root_valid, h_full;
  ts_t     h_root_key, h_enq_key;
  logic [15:0] h_root_qpn;
  logic [HEAP_LEVELS-1:0] h_count;

  pheap #(.LEVELS(HEAP_LEVELS), .ISSUE_INTERVAL(HEAP_ISSUE)) u_heap (
    .clk, .rst_n,
    .op_ready(h_ready), .enq(h_enq), .enq_key(h_enq_key), .enq_qpn(16'(qpn_q)),
    .deq(h_deq), .root_valid(h_root_valid), .root_key(h_root_key),
    .root_qpn(h_root_qpn), .count(h_count), .full(h_full)
  );

  // dividers for the per-flow constants
  logic        div_start, inv_busy, inv_done, bat_busy, bat_done;
  logic [31:0] inv_quot, bat_quot, bat_num, bat_den;
  logic        inv_have_q, bat_have_q;
  inv_t        inv_res_q;
  logic [31:0] bat_res_q;

  assign bat_num = 32'(ev_q.rate) * 32'(SCHED_LAT);
  assign bat_den = 32'(ev_q.size) * 32'(TICKS_PER_BYTE_AT_UNIT);

  seq_divider #(.W(32)) u_inv_div (
    .clk, .rst_n, .start(div_start),
    .num(32'(TICKS_PER_BYTE_AT_UNIT) << INV_FRAC), .den(32'(ev_q.rate)),
    .busy(inv_busy), .done(inv_done), .quot(inv_quot)
  );
  seq_divider #(.W(32)) u_bat_div (
    .clk, .rst_n, .start(div_start),
    .num(bat_num), .den(bat_den),
    .busy(bat_busy), .done(bat_done), .quot(bat_quot)
  );

  assign cur = ctx_mem[qpn_q];

  // the root is due: its key is within one scheduling latency of now
  logic due;
  assign due = h_root_valid && time_le(h_root_key, now + ts_t'(SCHED_LAT));

  idx_t        posted;
  logic [7:0]  nwqe;
  always_comb begin
    posted = cur.pi - cur.ci;
    nwqe   = (posted < idx_t'(cur.batch)) ? posted[7:0] : cur.batch;
  end

  assign fetch_qpn   = 16'(qpn_q);
  assign fetch_idx   = cur.ci;
  assign fetch_nwqe  = nwqe;
  assign fetch_start = cur.start;
  assign fetch_off   = cur.off;
  assign fetch_inv   = cur.inv;
  assign fetch_valid = (st == S_FETCH) && cur.rate != '0;
  assign init_done   = (st != S_INIT);

  assign ev_ready = (st == S_IDLE) && !(due && fetch_ready);
  assign h_deq    = (st == S_IDLE) && due && fetch_ready;
  assign h_enq    = (st == S_PUSH);
  assign h_enq_key = push_key_q;
  assign div_start = (st == S_EVENT) && ev_q.kind == EV_RATE && ev_q.rate != '0;
  assign ev_sched  = fetch_valid && fetch_ready;

  // max(start, now) for a flow that wakes up
  tsf_t wake_start;
  assign wake_start = time_before(cur.start[TS_W+TFRAC-1:TFRAC], now) ? now_f : cur.start;

  always_comb begin
    logic [31:0] b;
    nxt    = cur;
    ctx_we = 1'b0;
    ctx_wd = cur;
    b      = '0;
    unique case (st)
      S_INIT: begin
        ctx_we = 1'b1;
        ctx_wd = '0;
      end
      S_EVENT: begin
        unique case (ev_q.kind)
          EV_DOORBELL: begin
            nxt.pi = ev_q.idx;
            if (cur.st == F_IDLE && ev_q.idx != cur.ci && cur.rate != '0) begin
              nxt.start = wake_start;
              nxt.st    = F_QUEUED;
            end
            ctx_we = 1'b1;
          end
          EV_RESCHED: begin
            nxt.ci    = ev_q.idx;
            nxt.off   = ev_q.off;
            nxt.start = ev_q.start;
            nxt.st    = (cur.pi != ev_q.idx) ? F_QUEUED : F_IDLE;
            ctx_we    = 1'b1;
          end
          EV_RATE: begin
            if (ev_q.rate == '0) begin
              nxt.rate  = '0;
              nxt.inv   = '1;
              nxt.batch = 8'd1;
              ctx_we    = 1'b1;
            end
          end
          default: ;
        endcase
        ctx_wd = nxt;
      end
      S_DIV: if (inv_have_q && bat_have_q) begin
        b = bat_res_q;
        nxt.rate  = ev_q.rate;
        nxt.inv   = inv_res_q;
        nxt.batch = (b == 0) ? 8'd1 : (b > 32'(MAX_BATCH)) ? 8'(MAX_BATCH) : b[7:0];
        if (cur.st == F_IDLE && cur.pi != cur.ci) begin
          nxt.start = wake_start;
          nxt.st    = F_QUEUED;
        end
        ctx_we = 1'b1;
        ctx_wd = nxt;
      end
      // a flow whose rate was set to 0 while it was queued goes idle instead
      S_FETCH: if (fetch_ready || cur.rate == '0) begin
        nxt.st = (cur.rate == '0) ? F_IDLE : F_INFLIGHT;
        ctx_we = 1'b1;
        ctx_wd = nxt;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (ctx_we) ctx_mem[(st == S_INIT) ? init_idx : qpn_q] <= ctx_wd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_INIT; init_idx <= '0; qpn_q <= '0; ev_q <= '0; push_key_q <= '0;
      rate_sum <= '0; inv_have_q <= 1'b0; bat_have_q <= 1'b0;
      inv_res_q <= '0; bat_res_q <= '0;
    end else begin
      unique case (st)
        S_INIT: begin
          init_idx <= init_idx + 1'b1;
          if (init_idx == QW'(NUM_QPS - 1)) st <= S_IDLE;
        end
        S_IDLE: begin
          if (h_deq) begin
            qpn_q <= QW'(h_root_qpn);
            st    <= S_FETCH;
          end else if (ev_valid) begin
            ev_q  <= ev;
            qpn_q <= QW'(ev.qpn);
            st    <= S_EVENT;
          end
        end
        S_EVENT: begin
          st <= S_IDLE;
          unique case (ev_q.kind)
            EV_DOORBELL: if (nxt.st == F_QUEUED && cur.st == F_IDLE) begin
              push_key_q <= nxt.start[TS_W+TFRAC-1:TFRAC];
              rate_sum   <= rate_sum + SUM_W'(cur.rate);
              st         <= S_PUSH;
            end
            EV_RESCHED: if (nxt.st == F_QUEUED) begin
              push_key_q <= ev_q.key;
              st         <= S_PUSH;
            end else begin
              rate_sum   <= rate_sum - SUM_W'(cur.rate);
            end
            EV_RATE: begin
              if (ev_q.rate != '0) begin
                inv_have_q <= 1'b0;
                bat_have_q <= 1'b0;
                st <= S_DIV;
              end else if (cur.st != F_IDLE) begin
                rate_sum <= rate_sum - SUM_W'(cur.rate);
              end
            end
            default: ;
          endcase
        end
        S_DIV: begin
          if (inv_done) begin inv_have_q <= 1'b1; inv_res_q <= inv_quot; end
          if (bat_done) begin bat_have_q <= 1'b1; bat_res_q <= bat_quot; end
          if (inv_have_q && bat_have_q) begin
            st <= S_IDLE;
            if (cur.st != F_IDLE)
              rate_sum <= rate_sum - SUM_W'(cur.rate) + SUM_W'(ev_q.rate);
            else if (nxt.st == F_QUEUED) begin
              rate_sum   <= rate_sum + SUM_W'(ev_q.rate);
              push_key_q <= nxt.start[TS_W+TFRAC-1:TFRAC];
              st         <= S_PUSH;
            end
          end
        end
        S_PUSH: if (h_ready) st <= S_IDLE;
        S_FETCH: if (fetch_ready || cur.rate == '0) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // a flow is never in the heap twice: the heap holds at most NUM_QPS
  always_ff @(posedge clk)
    if (rst_n && h_enq) assert (!h_full) else $error("qp_scheduler: heap full");
endmodule
