// emux: event mux in front of the QP scheduler.
//
// Three sources produce scheduling events: host doorbells (a QP has new
// WQEs, with its new producer index), congestion control (a new rate limit
// and typical packet size for a QP) and the packet scheduler (a flow is ready
// to be rescheduled, with its new scheduling time and head position). The
// mux formats them into one event_t stream and grants the sources in
// round-robin order, one event per cycle, so none of them can starve the
// others. All ports are valid/ready; an event is held until taken.
//
// That the mux gathers these three kinds of event follows the paper; the
// round-robin policy and the event format are this design's choices.
module emux
  import tassel_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // doorbells
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
  // reschedule records from the packet scheduler
  input  logic        rs_valid,
  output logic        rs_ready,
  input  logic [15:0] rs_qpn,
  input  ts_t         rs_key,
  input  tsf_t        rs_start,
  input  idx_t        rs_idx,
  input  logic [31:0] rs_off,
  // to the QP scheduler
  output logic        ev_valid,
  input  logic        ev_ready,
  output event_t      ev
);
  logic [2:0] req, gnt;
  logic [1:0] last_q;      // index of the source granted last

  assign req = {rs_valid, cc_valid, db_valid};

  // round robin: search from the source after the last one granted
  always_comb begin
    gnt = '0;
    for (int k = 1; k <= 3; k++) begin
      int s;
      s = (int'(last_q) + k) % 3;
      if (gnt == '0 && req[s]) gnt[s] = 1'b1;
    end
  end

  assign ev_valid = |req;
  assign db_ready = gnt[0] && ev_ready;
  assign cc_ready = gnt[1] && ev_ready;
  assign rs_ready = gnt[2] && ev_ready;

  always_comb begin
    ev = '0;
    unique case (1'b1)
      gnt[0]: begin
        ev.kind = EV_DOORBELL; ev.qpn = db_qpn; ev.idx = db_pi;
      end
      gnt[1]: begin
        ev.kind = EV_RATE; ev.qpn = cc_qpn; ev.rate = cc_rate; ev.size = cc_size;
      end
      gnt[2]: begin
        ev.kind = EV_RESCHED; ev.qpn = rs_qpn; ev.key = rs_key; ev.start = rs_start;
        ev.idx = rs_idx; ev.off = rs_off;
      end
      default: ev = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_q <= 2'd2;
    else if (ev_valid && ev_ready)
      last_q <= gnt[0] ? 2'd0 : gnt[1] ? 2'd1 : 2'd2;
  end
endmodule
