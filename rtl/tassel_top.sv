// tassel_top: hierarchical rate limiter and scheduler for an RDMA NIC.
//
// It takes the place of the NIC's QP scheduler. Tier 1 (event mux, QP
// scheduler, pipelined heap) sorts up to NUM_QPS flows by the time their
// next packet may go and, one scheduling latency ahead of that time, asks
// the DMA engine for a batch of WQEs sized to what the flow may send in one
// latency. Tier 2 (packet scheduler) computes WF2Q+ start and finish times
// for the packets of those WQEs, keeps only the imminent ones (start within
// one latency of now), releases them through a timing wheel when they become
// eligible, sorts the eligible ones by finish time in a register array and
// sends the first whenever the link is idle. The first dropped packet of a
// fetch becomes the flow's new head and the flow is rescheduled. A global
// timer drives both tiers; it slows down by Phi when the active rates
// oversubscribe the link, and stops during a PFC pause.
//
// Outside this block, and reached through its ports: the host doorbells
// (db_*), the congestion-control rate updates (cc_*), the DMA engine (fetch
// requests out on dma_req_*, WQEs back on wqe_*, in request order) and the
// transport that builds and sends each packet (tx_*: one-cycle tx_valid
// pulses, tx_ready level). Parameter defaults are the paper's prototype:
// 16 K QPs, 250 MHz (4 ns ticks), 1 us scheduling latency, 250 wheel slots,
// 100 Gb/s link.
module tassel_top
  import tassel_pkg::*;
#(
  parameter int unsigned NUM_QPS      = 16384,
  parameter int unsigned HEAP_LEVELS  = 15,
  parameter int unsigned SCHED_LAT    = 250,
  parameter int unsigned WHEEL_SLOTS  = 250,
  parameter int unsigned IMMINENT_MAX = 128,
  parameter int unsigned SORT_DEPTH   = 128,
  parameter int unsigned MTU          = 1024,
  parameter int unsigned MAX_BATCH    = 64,
  parameter int unsigned LINK_RATE    = 1_000_000,   // 100 kb/s units
  parameter int unsigned LINK_BYTES_PER_CYCLE = 50
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pfc_pause,
  // doorbells from the host
  input  logic        db_valid,
  output logic        db_ready,
  input  logic [15:0] db_qpn,
  input  idx_t        db_pi,
  // rate updates from congestion control
  input  logic        cc_valid,
  output logic        cc_ready,
  input  logic [15:0] cc_qpn,
  input  rate_t       cc_rate,
  input  len_t        cc_size,
  // WQE fetch requests to the DMA engine
  output logic        dma_req_valid,
  input  logic        dma_req_ready,
  output logic [15:0] dma_req_qpn,
  output idx_t        dma_req_idx,
  output logic [7:0]  dma_req_nwqe,
  // WQEs from the DMA engine
  input  logic        wqe_valid,
  output logic        wqe_ready,
  input  wqe_t        wqe,
  // packets to transmit
  input  logic        tx_ready,
  output logic        tx_valid,
  output pkt_desc_t   tx_desc,
  output ts_t         tx_finish,
  output ts_t         tx_time,
  // status
  output ts_t         now,
  output logic        ready,
  output logic [15:0] timer_step,
  output logic [4:0]  events      // {link wait, eligible, distant, imminent, sched}
);
  localparam int unsigned SUM_W = 36;

  tsf_t             now_f;
  logic [SUM_W-1:0] rate_sum;

  global_timer #(.LINK_RATE(LINK_RATE), .SUM_W(SUM_W)) u_timer (
    .clk, .rst_n, .pause(pfc_pause), .rate_sum,
    .now, .now_f, .step_q(timer_step)
  );

  // reschedule path packet scheduler -> emux
  logic        rs_valid, rs_ready;
  logic [15:0] rs_qpn;
  ts_t         rs_key;
  tsf_t        rs_start;
  idx_t        rs_idx;
  logic [31:0] rs_off;

  logic   ev_valid, ev_ready;
  event_t ev;

  emux u_emux (
    .clk, .rst_n,
    .db_valid, .db_ready, .db_qpn, .db_pi,
    .cc_valid, .cc_ready, .cc_qpn, .cc_rate, .cc_size,
    .rs_valid, .rs_ready, .rs_qpn, .rs_key, .rs_start, .rs_idx, .rs_off,
    .ev_valid, .ev_ready, .ev
  );

  logic        f_valid, f_ready, fc_ready;
  logic [15:0] f_qpn;
  idx_t        f_idx;
  logic [7:0]  f_nwqe;
  tsf_t        f_start;
  logic [31:0] f_off;
  inv_t        f_inv;
  logic        ev_sched;

  qp_scheduler #(
    .NUM_QPS(NUM_QPS), .HEAP_LEVELS(HEAP_LEVELS), .SCHED_LAT(SCHED_LAT),
    .MAX_BATCH(MAX_BATCH), .SUM_W(SUM_W)
  ) u_qps (
    .clk, .rst_n, .now, .now_f,
    .ev_valid, .ev_ready, .ev,
    .fetch_valid(f_valid), .fetch_ready(f_ready), .fetch_qpn(f_qpn),
    .fetch_idx(f_idx), .fetch_nwqe(f_nwqe), .fetch_start(f_start),
    .fetch_off(f_off), .fetch_inv(f_inv),
    .rate_sum, .init_done(ready), .ev_sched
  );

  // a fetch goes to the DMA engine and to the packet scheduler together
  assign f_ready       = dma_req_ready && fc_ready;
  assign dma_req_valid = f_valid && fc_ready;
  assign dma_req_qpn   = f_qpn;
  assign dma_req_idx   = f_idx;
  assign dma_req_nwqe  = f_nwqe;

  logic ev_imm, ev_dist, ev_wait, ev_elig;

  packet_scheduler #(
    .MTU(MTU), .WINDOW(SCHED_LAT), .WHEEL_SLOTS(WHEEL_SLOTS),
    .IMMINENT_MAX(IMMINENT_MAX), .SORT_DEPTH(SORT_DEPTH),
    .LINK_BYTES_PER_CYCLE(LINK_BYTES_PER_CYCLE)
  ) u_pkt (
    .clk, .rst_n, .now,
    .fc_valid(f_valid && dma_req_ready), .fc_ready, .fc_qpn(f_qpn), .fc_idx(f_idx),
    .fc_nwqe(f_nwqe), .fc_start(f_start), .fc_off(f_off), .fc_inv(f_inv),
    .wqe_valid, .wqe_ready, .wqe,
    .rs_valid, .rs_ready, .rs_qpn, .rs_key, .rs_start, .rs_idx, .rs_off,
    .tx_ready, .tx_valid, .tx_desc, .tx_finish, .tx_time,
    .ev_imminent(ev_imm), .ev_distant(ev_dist), .ev_link_wait(ev_wait),
    .ev_eligible(ev_elig)
  );

  assign events = {ev_wait, ev_elig, ev_dist, ev_imm, ev_sched};
endmodule
