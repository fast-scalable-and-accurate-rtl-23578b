// time_calculator: WF2Q+ start and finish times of the packets of a fetch.
//
// When the QP scheduler schedules a flow it hands over a fetch context: the
// flow's scheduling time S_flow, the ring index and byte offset of its head
// packet, the number of WQEs asked from the host and the flow's reciprocal
// rate (ticks per byte). The WQEs then arrive from the DMA engine, in order.
// This block cuts each WQE's message into packets of at most MTU bytes,
// starting at the given offset in the first WQE, and gives every packet j
//     S_j = S_flow (j = 0),  S_j = F_(j-1) (j > 0),   F_j = S_j + L_j / R
// with L_j / R computed as L_j times the reciprocal rate, one multiply per
// packet, so one packet leaves per cycle. Times carry TFRAC fraction bits.
//
// Each packet leaves with its position (ring index and offset), so that the
// packet filter can name the first packet it drops as the new head of the
// flow. While the filter holds stop high (it has found a distant packet) the
// rest of the fetch is not split into packets: the remaining WQEs are taken
// from the DMA stream and thrown away. Every fetch ends with one end marker that gives
// the position and start time just after the last packet made.
//
// The formula is the paper's. Splitting messages into MTU packets, the
// reciprocal-rate multiply and the stream format are this design's choices.
module time_calculator
  import tassel_pkg::*;
#(
  parameter int unsigned MTU = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // fetch context
  input  logic        ctx_valid,
  output logic        ctx_ready,
  input  logic [15:0] ctx_qpn,
  input  idx_t        ctx_idx,
  input  logic [7:0]  ctx_nwqe,
  input  tsf_t        ctx_start,
  input  logic [31:0] ctx_off,
  input  inv_t        ctx_inv,
  // WQEs from the DMA engine
  input  logic        wqe_valid,
  output logic        wqe_ready,
  input  wqe_t        wqe,
  // packets out
  output logic        pkt_valid,
  input  logic        pkt_ready,
  output logic        pkt_end,      // end marker, no packet
  output pkt_desc_t   pkt_desc,
  output tsf_t        pkt_s,
  output tsf_t        pkt_f,
  output logic [31:0] pkt_off,      // offset of the packet within its message
  input  logic        stop
);
  typedef enum logic [2:0] {IDLE, WAIT_WQE, GEN, DRAIN, FINISH} state_e;
  state_e      st;
  logic [15:0] qpn_q;
  idx_t        idx_q;
  logic [7:0]  beats_q;      // WQEs still to receive
  tsf_t        s_q;
  logic [31:0] off_q;
  inv_t        inv_q;
  wqe_t        cur_q;

  logic [31:0] left;
  len_t        plen;
  logic [LEN_W+INV_W-1:0] prod;
  tsf_t        gap;

  always_comb begin
    left = cur_q.msg_len - off_q;
    plen = (left > 32'(MTU)) ? len_t'(MTU) : len_t'(left);
    prod = plen * inv_q;
    gap  = tsf_t'(prod >> (INV_FRAC - TFRAC));
  end

  assign ctx_ready = (st == IDLE);
  assign wqe_ready = (st == WAIT_WQE && !stop) || (st == DRAIN);

  always_comb begin
    pkt_valid = 1'b0;
    pkt_end   = 1'b0;
    pkt_desc  = '{qpn: qpn_q, wqe_idx: idx_q, addr: cur_q.addr + addr_t'(off_q), len: plen};
    pkt_s     = s_q;
    pkt_f     = s_q + gap;
    pkt_off   = off_q;
    if (st == GEN && !stop) pkt_valid = 1'b1;
    if (st == FINISH) begin
      pkt_valid = 1'b1;
      pkt_end   = 1'b1;
      pkt_f     = s_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE;
      qpn_q <= '0; idx_q <= '0; beats_q <= '0; s_q <= '0; off_q <= '0;
      inv_q <= '0; cur_q <= '0;
    end else begin
      unique case (st)
        IDLE: if (ctx_valid) begin
          qpn_q   <= ctx_qpn;
          idx_q   <= ctx_idx;
          beats_q <= ctx_nwqe;
          s_q     <= ctx_start;
          off_q   <= ctx_off;
          inv_q   <= ctx_inv;
          st      <= WAIT_WQE;
        end
        WAIT_WQE: if (stop) begin
          st <= (beats_q == '0) ? FINISH : DRAIN;
        end else if (wqe_valid) begin
          cur_q   <= wqe;
          beats_q <= beats_q - 1'b1;
          st      <= GEN;
        end
        GEN: begin
          if (stop) begin
            // the filter has its new head; drop the remaining WQEs
            st <= (beats_q == '0) ? FINISH : DRAIN;
          end else if (pkt_ready) begin
            s_q <= pkt_f;
            if (off_q + 32'(plen) >= cur_q.msg_len) begin
              off_q <= '0;
              idx_q <= idx_q + 1'b1;
              st    <= (beats_q == '0) ? FINISH : WAIT_WQE;
            end else begin
              off_q <= off_q + 32'(plen);
            end
          end
        end
        DRAIN: if (wqe_valid) begin
          beats_q <= beats_q - 1'b1;
          if (beats_q == 8'd1) st <= FINISH;
        end
        FINISH: if (pkt_ready) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
