// timing_wheel: eligibility evaluation of imminent packets by start time.
//
// A circular array of SLOTS slots, one per tick of 4 ns, covers one
// scheduling latency ahead of the system time (250 slots for 1 us, as in the
// paper). Each slot holds a linked list of packet handles (indices into the
// WQE buffer); the lists share one next-pointer memory with one entry per
// handle, so the wheel stores no more than POOL packets in total.
//
// Insert (O(1)): a packet whose start time S is at or after the cursor goes
// into slot cursor_slot + (S - cursor_time); a packet already due (S before
// the cursor) goes into the cursor slot. A packet more than SLOTS ticks ahead
// of the cursor is held off with ins_ready low (packet filtering keeps S
// within one scheduling latency of the system time, so this only happens if
// the cursor lags). Release (O(1)): while the cursor time is not after the
// system time the cursor slot's packets are handed out one per cycle, oldest
// first. From an empty slot the cursor jumps in one cycle to the next slot
// that holds packets, or to the system time if that comes first (a search
// over the slot occupancy bits), so it never falls behind T for longer than
// it takes to hand out the packets that are due. A released packet is
// eligible: S <= T.
//
// Interfaces are valid/ready. The slot structure and the 4 ns granularity
// follow the paper; linked lists per slot and the release order within a
// slot are this design's choice.
module timing_wheel
  import tassel_pkg::*;
#(
  parameter int unsigned SLOTS = 250,
  parameter int unsigned POOL  = 128
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  ts_t                     now,
  input  logic                    ins_valid,
  output logic                    ins_ready,
  input  logic [$clog2(POOL)-1:0] ins_handle,
  input  ts_t                     ins_start,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [$clog2(POOL)-1:0] out_handle,
  output logic [$clog2(POOL+1)-1:0] occupancy
);
  localparam int unsigned HW = $clog2(POOL);
  localparam int unsigned SW = $clog2(SLOTS);

  logic [HW-1:0]  head [SLOTS];
  logic [HW-1:0]  tail [SLOTS];
  logic [HW-1:0]  next_ptr [POOL];
  logic [SLOTS-1:0] busy_q;          // slot list is not empty
  ts_t            cur_time;
  logic [SW-1:0]  cur_slot;

  ts_t            ahead;
  logic [SW:0]    ins_slot_w;
  logic [SW-1:0]  ins_slot;
  logic           ins_fire, pop_fire, advance;
  logic           cur_busy, cur_single;

  always_comb begin
    ahead = ins_start - cur_time;
    ins_slot_w = '0;
    if (time_before(ins_start, cur_time)) begin
      ins_slot  = cur_slot;
      ins_ready = 1'b1;
    end else begin
      ins_ready  = ahead < ts_t'(SLOTS);
      ins_slot_w = {1'b0, cur_slot} + (SW+1)'(ahead[SW:0]);
      if (ins_slot_w >= (SW+1)'(SLOTS)) ins_slot_w = ins_slot_w - (SW+1)'(SLOTS);
      ins_slot  = ins_slot_w[SW-1:0];
    end
  end

  // distance from the cursor to the next slot that holds packets (or is being
  // filled this cycle), SLOTS if there is none
  logic [SLOTS-1:0] busy_eff;
  logic [SW:0]      next_busy, step;
  ts_t              lag;
  always_comb begin
    busy_eff = busy_q;
    if (ins_fire) busy_eff[ins_slot] = 1'b1;
    next_busy = (SW+1)'(SLOTS);
    for (int k = SLOTS - 1; k >= 1; k--) begin
      int unsigned j;
      j = int'(cur_slot) + k;
      if (j >= SLOTS) j = j - SLOTS;
      if (busy_eff[j]) next_busy = (SW+1)'(k);
    end
    lag  = now - cur_time;
    step = (lag < ts_t'(next_busy)) ? (SW+1)'(lag) : next_busy;
  end

  assign cur_busy   = busy_q[cur_slot];
  assign cur_single = head[cur_slot] == tail[cur_slot];
  assign out_valid  = cur_busy && time_le(cur_time, now);
  assign out_handle = head[cur_slot];
  assign ins_fire   = ins_valid && ins_ready;
  assign pop_fire   = out_valid && out_ready;
  // the cursor moves on only from an empty slot nobody is inserting into
  assign advance    = !cur_busy && time_before(cur_time, now) &&
                      !(ins_fire && ins_slot == cur_slot);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q    <= '0;
      cur_time  <= '0;
      cur_slot  <= '0;
      occupancy <= '0;
    end else begin
      occupancy <= occupancy + ($clog2(POOL+1))'(ins_fire) - ($clog2(POOL+1))'(pop_fire);
      if (advance) begin
        logic [SW+1:0] ns;
        ns = {1'b0, cur_slot} + {1'b0, step};
        if (ns >= (SW+2)'(SLOTS)) ns = ns - (SW+2)'(SLOTS);
        cur_time <= cur_time + ts_t'(step);
        cur_slot <= ns[SW-1:0];
      end
      // release from the cursor slot
      if (pop_fire && cur_single && !(ins_fire && ins_slot == cur_slot))
        busy_q[cur_slot] <= 1'b0;
      // append to the insert slot
      if (ins_fire) busy_q[ins_slot] <= 1'b1;
    end
  end

  // list pointers need no reset: busy_q guards them
  always_ff @(posedge clk) begin
    if (pop_fire && !cur_single) head[cur_slot] <= next_ptr[head[cur_slot]];
    if (ins_fire) begin
      if (!busy_q[ins_slot] || (pop_fire && cur_single && ins_slot == cur_slot)) begin
        head[ins_slot] <= ins_handle;
      end else begin
        next_ptr[tail[ins_slot]] <= ins_handle;
      end
      tail[ins_slot] <= ins_handle;
    end
  end
endmodule
