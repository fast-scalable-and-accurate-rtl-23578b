// packet_filter: keeps the imminent packets of a fetch and drops the rest.
//
// The imminent window is one scheduling latency (WINDOW ticks) from the
// system time T. A packet from the time calculator whose start time S falls
// before T + WINDOW is imminent: it takes a free handle of the WQE buffer,
// its descriptor and finish time are written there, and the handle goes into
// the timing wheel at time S. The first packet with S at or after T + WINDOW
// is distant: it and everything after it in the fetch is dropped (stop is
// raised so the time calculator skips the rest), and its start time and
// position become the flow's new head.
//
// At the end marker of the fetch one reschedule record leaves for the event
// mux: the QP number, the new scheduling key, the start time of the new head
// packet and its position (ring index, offset). If a packet was dropped the
// key is that packet's start time. If every packet was imminent the key is
// the current time T, so the flow is scheduled again at once, while the start
// time of its next packet stays the finish time of the last packet sent, so
// the rate is still kept. An imminent packet waits (in_ready low) while the
// WQE buffer has no free handle or the timing wheel cannot take it yet.
//
// The window rule, the drop of distant packets and the two reschedule cases
// follow the paper; keeping the next start time at the last finish time in
// the all-imminent case is this design's choice.
module packet_filter
  import tassel_pkg::*;
#(
  parameter int unsigned WINDOW = 250,
  parameter int unsigned HW     = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ts_t           now,
  // from the time calculator
  input  logic          in_valid,
  output logic          in_ready,
  input  logic          in_end,
  input  pkt_desc_t     in_desc,
  input  tsf_t          in_s,
  input  tsf_t          in_f,
  input  logic [31:0]   in_off,
  output logic          stop,
  // WQE buffer allocation
  input  logic          buf_avail,
  input  logic [HW-1:0] buf_handle,
  output logic          buf_alloc,
  output pkt_desc_t     buf_desc,
  output ts_t           buf_finish,
  // timing wheel insert
  output logic          whl_valid,
  input  logic          whl_ready,
  output logic [HW-1:0] whl_handle,
  output ts_t           whl_start,
  // reschedule record
  output logic          rs_valid,
  input  logic          rs_ready,
  output logic [15:0]   rs_qpn,
  output ts_t           rs_key,
  output tsf_t          rs_start,
  output idx_t          rs_idx,
  output logic [31:0]   rs_off,
  // event counters for observation
  output logic          ev_imminent,
  output logic          ev_distant
);
  logic        seen_q;      // a distant packet was found in this fetch
  tsf_t        d_start_q;
  idx_t        d_idx_q;
  logic [31:0] d_off_q;

  ts_t  s_int;
  logic imminent;

  assign s_int    = in_s[TS_W+TFRAC-1:TFRAC];
  assign imminent = time_before(s_int, now + ts_t'(WINDOW));
  assign stop     = seen_q;

  always_comb begin
    in_ready   = 1'b0;
    buf_alloc  = 1'b0;
    whl_valid  = 1'b0;
    rs_valid   = 1'b0;
    ev_imminent = 1'b0;
    ev_distant  = 1'b0;
    if (in_valid) begin
      if (in_end) begin
        rs_valid = 1'b1;
        in_ready = rs_ready;
      end else if (seen_q) begin
        in_ready = 1'b1;                    // after the first distant packet
      end else if (!imminent) begin
        in_ready   = 1'b1;
        ev_distant = 1'b1;
      end else begin
        whl_valid   = buf_avail;
        in_ready    = buf_avail && whl_ready;
        buf_alloc   = in_ready;
        ev_imminent = in_ready;
      end
    end
  end

  assign buf_desc   = in_desc;
  assign buf_finish = in_f[TS_W+TFRAC-1:TFRAC];
  assign whl_handle = buf_handle;
  assign whl_start  = s_int;

  assign rs_qpn   = in_desc.qpn;
  assign rs_key   = seen_q ? d_start_q[TS_W+TFRAC-1:TFRAC] : now;
  assign rs_start = seen_q ? d_start_q : in_s;
  assign rs_idx   = seen_q ? d_idx_q : in_desc.wqe_idx;
  assign rs_off   = seen_q ? d_off_q : in_off;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_q <= 1'b0; d_start_q <= '0; d_idx_q <= '0; d_off_q <= '0;
    end else if (in_valid && in_ready) begin
      if (in_end) begin
        seen_q <= 1'b0;
      end else if (!seen_q && !imminent) begin
        seen_q    <= 1'b1;
        d_start_q <= in_s;
        d_idx_q   <= in_desc.wqe_idx;
        d_off_q   <= in_off;
      end
    end
  end
endmodule
