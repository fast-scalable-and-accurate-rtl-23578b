// wqe_buffer: storage for the descriptors of imminent packets.
//
// Only packets inside the imminent window are kept on chip; each occupies one
// of DEPTH entries, named by a handle that the timing wheel and the register
// array carry instead of the descriptor. An entry holds the packet
// descriptor (QP, ring index, data address, length) and its finish time.
//
// Allocation: alloc_avail says a handle is free and alloc_handle names it;
// pulsing alloc writes wr_desc / wr_finish there and takes the handle.
// Handles never used since reset are handed out from a counter, returned
// ones from a free FIFO, so no initialisation sweep is needed. Two
// asynchronous read ports (the wheel's released packet, the transmitted
// packet) and a release port (free, free_handle) complete it.
//
// The paper names the buffer and its role; the handle scheme is this
// design's choice.
module wqe_buffer
  import tassel_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned HW    = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          alloc_avail,
  output logic [HW-1:0] alloc_handle,
  input  logic          alloc,
  input  pkt_desc_t     wr_desc,
  input  ts_t           wr_finish,
  input  logic [HW-1:0] rd0_handle,
  output pkt_desc_t     rd0_desc,
  output ts_t           rd0_finish,
  input  logic [HW-1:0] rd1_handle,
  output pkt_desc_t     rd1_desc,
  output ts_t           rd1_finish,
  input  logic          free,
  input  logic [HW-1:0] free_handle,
  output logic [HW:0]   in_use
);
  pkt_desc_t     desc_mem [DEPTH];
  ts_t           fin_mem  [DEPTH];
  logic [HW-1:0] free_fifo [DEPTH];
  logic [HW:0]   fresh_q;             // handles never handed out yet
  logic [HW-1:0] rd_ptr, wr_ptr;
  logic [HW:0]   nfree_q;             // entries in free_fifo
  logic          use_fresh;

  assign use_fresh    = fresh_q != (HW+1)'(DEPTH);
  assign alloc_avail  = use_fresh || (nfree_q != '0);
  assign alloc_handle = use_fresh ? fresh_q[HW-1:0] : free_fifo[rd_ptr];

  assign rd0_desc   = desc_mem[rd0_handle];
  assign rd0_finish = fin_mem[rd0_handle];
  assign rd1_desc   = desc_mem[rd1_handle];
  assign rd1_finish = fin_mem[rd1_handle];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fresh_q <= '0; rd_ptr <= '0; wr_ptr <= '0; nfree_q <= '0; in_use <= '0;
    end else begin
      if (alloc && alloc_avail) begin
        if (use_fresh) fresh_q <= fresh_q + 1'b1;
        else           rd_ptr  <= (rd_ptr == HW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      end
      if (free) wr_ptr <= (wr_ptr == HW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      nfree_q <= nfree_q + (HW+1)'(free) - (HW+1)'(alloc && alloc_avail && !use_fresh);
      in_use  <= in_use + (HW+1)'(alloc && alloc_avail) - (HW+1)'(free);
    end
  end

  always_ff @(posedge clk) begin
    if (alloc && alloc_avail) begin
      desc_mem[alloc_handle] <= wr_desc;
      fin_mem[alloc_handle]  <= wr_finish;
    end
    if (free) free_fifo[wr_ptr] <= free_handle;
  end
endmodule
