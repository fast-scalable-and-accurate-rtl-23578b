// packet_scheduler: tier 2 of the rate limiter, packet-level rate limiting.
//
// Fetched WQEs flow through this chain:
//   fetch context FIFO -> time_calculator (WF2Q+ start S and finish F)
//   -> packet_filter (keep imminent packets, build the reschedule record)
//   -> wqe_buffer (descriptor and F per imminent packet, named by a handle)
//   -> timing_wheel (holds handles until S <= T: eligibility evaluation)
//   -> register_array (eligible handles sorted by F: rank sorting)
//   -> transmit.
// The head of the register array, the eligible packet that finishes first,
// is taken only when the link is idle and tx_ready is high. The link state is
// worked out from the length of the last packet sent: a byte counter is
// loaded with the packet length and drains LINK_BYTES_PER_CYCLE bytes per
// clock (50 for 100 Gb/s at 250 MHz); the remainder carries over between
// back-to-back packets so the long-run rate is exact. Taking a packet only
// when the link is idle keeps a packet that becomes eligible later, but
// finishes earlier, from being passed over.
//
// Transmit: tx_valid pulses for one cycle with the packet descriptor, its
// finish time and the system time; the packet's WQE-buffer entry is freed at
// the same time. Fetch contexts (fc_*) come from the QP scheduler when it
// asks the DMA engine for WQEs, which arrive on wqe_* in the same order.
// Reschedule records (rs_*) go to the event mux.
//
// The chain, the two sorted structures and the link-idle rule follow the
// paper; the FIFO depth, the handle scheme and the byte counter are this
// design's choices.
module packet_scheduler
  import tassel_pkg::*;
#(
  parameter int unsigned MTU                 = 1024,
  parameter int unsigned WINDOW              = 250,   // scheduling latency, ticks
  parameter int unsigned WHEEL_SLOTS         = 250,
  parameter int unsigned IMMINENT_MAX        = 128,   // WQE buffer entries
  parameter int unsigned SORT_DEPTH          = 128,   // register array entries
  parameter int unsigned LINK_BYTES_PER_CYCLE = 50,
  parameter int unsigned CTX_DEPTH           = 128   // fetches in flight
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ts_t         now,
  // fetch contexts from the QP scheduler
  input  logic        fc_valid,
  output logic        fc_ready,
  input  logic [15:0] fc_qpn,
  input  idx_t        fc_idx,
  input  logic [7:0]  fc_nwqe,
  input  tsf_t        fc_start,
  input  logic [31:0] fc_off,
  input  inv_t        fc_inv,
  // WQEs from the DMA engine
  input  logic        wqe_valid,
  output logic        wqe_ready,
  input  wqe_t        wqe,
  // reschedule records to the event mux
  output logic        rs_valid,
  input  logic        rs_ready,
  output logic [15:0] rs_qpn,
  output ts_t         rs_key,
  output tsf_t        rs_start,
  output idx_t        rs_idx,
  output logic [31:0] rs_off,
  // packets to transport
  input  logic        tx_ready,
  output logic        tx_valid,
  output pkt_desc_t   tx_desc,
  output ts_t         tx_finish,
  output ts_t         tx_time,
  // observation
  output logic        ev_imminent,
  output logic        ev_distant,
  output logic        ev_link_wait,    // a packet waited for the link
  output logic        ev_eligible
);
  localparam int unsigned HW = $clog2(IMMINENT_MAX);
  localparam int unsigned CW = $clog2(CTX_DEPTH);

  // ---------------- fetch context FIFO ----------------
  typedef struct packed {
    logic [15:0] qpn;
    idx_t        idx;
    logic [7:0]  nwqe;
    tsf_t        start;
    logic [31:0] off;
    inv_t        inv;
  } fctx_t;

  fctx_t         cf_mem [CTX_DEPTH];
  logic [CW-1:0] cf_rd, cf_wr;
  logic [CW:0]   cf_cnt;
  fctx_t         cf_head;
  logic          cf_pop;

  assign fc_ready = cf_cnt != (CW+1)'(CTX_DEPTH);
  assign cf_head  = cf_mem[cf_rd];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cf_rd <= '0; cf_wr <= '0; cf_cnt <= '0;
    end else begin
      if (fc_valid && fc_ready) cf_wr <= cf_wr + 1'b1;
      if (cf_pop) cf_rd <= cf_rd + 1'b1;
      cf_cnt <= cf_cnt + (CW+1)'(fc_valid && fc_ready) - (CW+1)'(cf_pop);
    end
  end
  always_ff @(posedge clk)
    if (fc_valid && fc_ready)
      cf_mem[cf_wr] <= '{qpn: fc_qpn, idx: fc_idx, nwqe: fc_nwqe, start: fc_start,
                         off: fc_off, inv: fc_inv};

  // ---------------- time calculator ----------------
  logic        tc_ctx_ready;
  logic        p_valid, p_ready, p_end, stop;
  pkt_desc_t   p_desc;
  tsf_t        p_s, p_f;
  logic [31:0] p_off;

  assign cf_pop = (cf_cnt != '0) && tc_ctx_ready;

  time_calculator #(.MTU(MTU)) u_calc (
    .clk, .rst_n,
    .ctx_valid(cf_cnt != '0), .ctx_ready(tc_ctx_ready),
    .ctx_qpn(cf_head.qpn), .ctx_idx(cf_head.idx), .ctx_nwqe(cf_head.nwqe),
    .ctx_start(cf_head.start), .ctx_off(cf_head.off), .ctx_inv(cf_head.inv),
    .wqe_valid, .wqe_ready, .wqe,
    .pkt_valid(p_valid), .pkt_ready(p_ready), .pkt_end(p_end), .pkt_desc(p_desc),
    .pkt_s(p_s), .pkt_f(p_f), .pkt_off(p_off), .stop
  );

  // ---------------- packet filter + WQE buffer ----------------
  logic          b_avail, b_alloc;
  logic [HW-1:0] b_handle;
  pkt_desc_t     b_desc;
  ts_t           b_finish;
  logic          w_ins_valid, w_ins_ready;
  logic [HW-1:0] w_ins_handle;
  ts_t           w_ins_start;

  packet_filter #(.WINDOW(WINDOW), .HW(HW)) u_filter (
    .clk, .rst_n, .now,
    .in_valid(p_valid), .in_ready(p_ready), .in_end(p_end), .in_desc(p_desc),
    .in_s(p_s), .in_f(p_f), .in_off(p_off), .stop,
    .buf_avail(b_avail), .buf_handle(b_handle), .buf_alloc(b_alloc),
    .buf_desc(b_desc), .buf_finish(b_finish),
    .whl_valid(w_ins_valid), .whl_ready(w_ins_ready),
    .whl_handle(w_ins_handle), .whl_start(w_ins_start),
    .rs_valid, .rs_ready, .rs_qpn, .rs_key, .rs_start, .rs_idx, .rs_off,
    .ev_imminent, .ev_distant
  );

  logic [HW-1:0] w_out_handle, ra_head_handle;
  pkt_desc_t     rd0_desc, rd1_desc;
  ts_t           rd0_fin, rd1_fin;
  logic          tx_fire;
  logic [HW:0]   buf_in_use;

  wqe_buffer #(.DEPTH(IMMINENT_MAX), .HW(HW)) u_buf (
    .clk, .rst_n,
    .alloc_avail(b_avail), .alloc_handle(b_handle), .alloc(b_alloc),
    .wr_desc(b_desc), .wr_finish(b_finish),
    .rd0_handle(w_out_handle), .rd0_desc(rd0_desc), .rd0_finish(rd0_fin),
    .rd1_handle(ra_head_handle), .rd1_desc(rd1_desc), .rd1_finish(rd1_fin),
    .free(tx_fire), .free_handle(ra_head_handle),
    .in_use(buf_in_use)
  );

  // ---------------- timing wheel: eligibility ----------------
  logic w_out_valid, w_out_ready;
  logic [$clog2(IMMINENT_MAX+1)-1:0] w_occ;

  timing_wheel #(.SLOTS(WHEEL_SLOTS), .POOL(IMMINENT_MAX)) u_wheel (
    .clk, .rst_n, .now,
    .ins_valid(w_ins_valid), .ins_ready(w_ins_ready),
    .ins_handle(w_ins_handle), .ins_start(w_ins_start),
    .out_valid(w_out_valid), .out_ready(w_out_ready), .out_handle(w_out_handle),
    .occupancy(w_occ)
  );

  // ---------------- register array: rank sorting ----------------
  logic ra_head_valid, ra_full;
  ts_t  ra_head_key;
  logic [$clog2(SORT_DEPTH+1)-1:0] ra_count;

  register_array #(.DEPTH(SORT_DEPTH), .HW(HW)) u_sort (
    .clk, .rst_n,
    .enq_valid(w_out_valid), .enq_ready(w_out_ready),
    .enq_key(rd0_fin), .enq_handle(w_out_handle),
    .head_valid(ra_head_valid), .head_key(ra_head_key), .head_handle(ra_head_handle),
    .deq(tx_fire), .full(ra_full), .count(ra_count)
  );

  assign ev_eligible = w_out_valid && w_out_ready;

  // ---------------- link state and transmit ----------------
  localparam int unsigned BW = LEN_W + 2;
  logic signed [BW-1:0] link_q;   // bytes still on the wire
  logic link_idle;

  assign link_idle    = link_q <= 0;
  assign tx_fire      = ra_head_valid && link_idle && tx_ready;
  assign ev_link_wait = ra_head_valid && !link_idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link_q    <= '0;
      tx_valid  <= 1'b0;
      tx_desc   <= '0;
      tx_finish <= '0;
      tx_time   <= '0;
    end else begin
      tx_valid <= tx_fire;
      if (tx_fire) begin
        tx_desc   <= rd1_desc;
        tx_finish <= rd1_fin;
        tx_time   <= now;
        link_q    <= link_q + BW'(rd1_desc.len) - BW'(LINK_BYTES_PER_CYCLE);
      end else if (link_q > 0) begin
        link_q <= link_q - BW'(LINK_BYTES_PER_CYCLE);
      end else begin
        link_q <= '0;    // an idle link keeps no credit
      end
    end
  end
endmodule
