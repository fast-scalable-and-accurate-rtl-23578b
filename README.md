# Tassel: a two-level rate limiter for RDMA NICs

An RDMA NIC has to pace tens of thousands of queue pairs (QPs, or flows),
each at its own rate from congestion control, and still fill a 100 Gb/s
link. An exact packet-by-packet scheduler (WF2Q+) over all flows is accurate
and fast. Once it must sort 16 K flows, though, it can no longer make one
decision per packet at line rate. This design splits the work into two tiers:

* **Flow tier.** The *QP scheduler* sorts all flows by the time their next
  packet may start. It takes out one flow at a time and fetches a batch of
  that flow's WQEs (work queue entries, one per message) from the host. The
  batch size is chosen so that one sort serves many packets.
* **Packet tier.** The *packet scheduler* computes exact WF2Q+ start and finish
  times for the fetched packets. It keeps only the few that start within the
  next microsecond and runs the exact WF2Q+ selection over those, usually a
  hundred or so.

Both tiers read one **global timer**. The whole design is in `rtl/`, written in
synthesizable SystemVerilog; the top module is `tassel_top`.

## Time, rates and number formats

One tick is one 4 ns clock cycle at 250 MHz. The system time `T` is 24 bits
(67 ms) and wraps. Every time comparison uses the sign of the difference
(`time_before` in `tassel_pkg`), so two times compare correctly while they are
less than 2^23 ticks apart.

* **Rates** are in units of 100 kb/s. The link is 1,000,000 units = 100 Gb/s.
* **Flow times** (the start times S and finish times F) carry 8 fraction bits,
  so rounding does not build up across packets.
* **Reciprocal rate.** Each flow keeps `inv = 20000 * 2^16 / rate`, in ticks per
  byte with 16 fraction bits. A packet's duration `L / R` is then one multiply:
  `(L * inv) >> 8` in fraction-tick units.

## Global timer (`global_timer`)

Each cycle, `T` advances by `1 / max(1, Phi)` ticks:

* `Phi` is the sum of the rate limits of the active flows divided by the link
  rate.
* While the link is not oversubscribed, `T` is real time.
* When the link is oversubscribed, `T` slows down by `Phi`. Every flow is then
  paced at its limit divided by `Phi`. The rates add up to the link rate, and
  the link is shared in proportion to the limits. At `Phi = 2` each flow gets
  half of its limit.
* `1/Phi` comes from a divider that runs continuously. A rate change reaches
  the timer step about 40 cycles later. The step has 8 fraction bits and is at
  least 1/256.
* `pfc_pause` stops `T`, so nothing new becomes eligible until the pause ends.

## Flow tier

### Event mux (`emux`)

Three sources change flow state:

* host doorbells (a new producer index for a QP's WQE ring);
* congestion-control rate updates (rate and typical packet size);
* reschedule records from the packet tier.

The mux grants them round robin and turns each into an `event_t`.

### QP scheduler (`qp_scheduler`) and pipelined heap (`pheap`)

Per-QP context (16 K entries) holds:

* the rate, the reciprocal rate and the batch size;
* the flow's scheduling time `S_flow`, with the ring index and byte offset of
  its head packet;
* the producer index and a state: idle, queued (in the heap) or in flight
  (fetched, waiting for its reschedule record).

**Scheduling rule.** A flow is due when its key is not after
`T + SCHED_LAT` (250 ticks = 1 us). SCHED_LAT is the time a WQE fetch takes
to come back, so the WQEs arrive in time. A due root takes priority over a
pending event. It is removed from the heap and issued as one fetch request.
The request goes to the DMA engine and, as a *fetch context*, to the packet
scheduler.

**Adaptive batch.** The batch is the number of packets the flow may send
within one scheduling latency:

    N = rate * SCHED_LAT / (typical_size * 20000)     (25 Gb/s, 1 KB -> 3)

* N is at least 1 and at most `MAX_BATCH`, and never more than the WQEs
  posted.
* Every WQE is treated as a one-packet message, so a batch is a number of
  WQEs. Packets of longer messages that the filter drops are fetched again
  later.
* N and the reciprocal rate are worked out by two sequential dividers when a
  rate is set.

**Waking and rescheduling.**

* A flow that wakes from idle starts at `max(S_flow, T)`, so idle time
  earns no burst.
* A flow with no WQEs left after its reschedule record goes idle, and its
  rate leaves the active sum.
* A rate of 0 keeps a flow out of the heap. A queued flow whose rate drops
  to 0 goes idle when it reaches the root, instead of being fetched.

**Heap.** `pheap` is a pipelined binary min-heap with one memory per level
and 15 levels (32767 entries). An operation walks down one level per
cycle, and a new one can start every 4 cycles.

* **Enqueue.** At each node the smaller entry stays. The larger continues into
  the child subtree that still has room; per-node subtree counts track this.
* **Dequeue.** The hole left by the root is filled by promoting the smaller
  child, level by level.

## Packet tier (`packet_scheduler`)

Fetched WQEs pass through a fixed chain:

    fetch-context FIFO -> time_calculator -> packet_filter -> wqe_buffer
                       -> timing_wheel (S <= T?) -> register_array (min F) -> link

### Start and finish times (`time_calculator`)

Each WQE's message is cut into packets of at most `MTU` bytes, starting at the
flow's head offset. The packets of one fetch get:

    S_0 = S_flow,   S_j = F_(j-1),   F_j = S_j + L_j / R

One packet leaves per cycle. The fetch ends with an *end marker* that carries
the position and start time just after the last packet made.

### Imminent packets and rescheduling (`packet_filter`)

A packet is *imminent* if `S < T + 250`, i.e. it could start within one
scheduling latency.

* **Imminent packets** are written to the WQE buffer and put into the timing
  wheel.
* **The first distant packet** (S beyond the window) becomes the flow's new
  head. Its S is the new heap key, and its ring index and offset are where the
  next fetch resumes. The filter raises `stop`. The calculator then discards the
  rest of the fetch, including any remaining WQEs, which are consumed and
  dropped.
* **If every packet was imminent**, the flow is rescheduled at the current
  `T`, starting right after its last packet. The QP scheduler fetches it again
  at once.

Distant packets cost nothing but a later re-fetch of their WQE. This is what
bounds the packet tier to about `packet rate x 1 us` packets: 125 at
125 Mpps. The buffer, wheel and sorter are sized 128.

### Eligibility (`timing_wheel`) and rank sorting (`register_array`)

**Timing wheel.** The wheel has 250 slots of one tick each and holds packet
handles by S.

* A handle is linked into the slot `S - cursor` ahead of the cursor. A start
  time already passed goes into the cursor slot.
* The cursor releases the handles of its slot, one per cycle, once the slot's
  time is not after `T`.
* From an empty slot, the cursor jumps straight to the next busy slot or to
  `T`, whichever is nearer. This is needed: a cursor that moved one slot per
  cycle would fall behind `T` for good after the first busy slot. It would
  then refuse new packets and stall the whole chain.

**Register array.** Released (eligible) packets go into the register array, a
128-entry compare-and-shift list sorted by F.

* Each operation takes two cycles: compare every entry with the new key, then
  shift.
* An insert and a removal offered in the same cycle are done as one
  operation. The head leaves, the entries in front of the insertion point move
  forward one place, and the new entry drops in behind them. One packet can
  therefore enter and one leave every two cycles: 125 Mpps, enough for
  100-byte packets at 100 Gb/s.
* Equal keys stay in arrival order.

**Transmit.** The head of the array is sent only when the link is idle. A
packet that becomes eligible a little later but finishes earlier must not find
the link already committed to a worse choice.

* Link state is a byte counter. It is loaded with each packet's length and
  drains 50 bytes per cycle (100 Gb/s at 250 MHz).
* Any remainder carries over to the next packet, so the long-run rate is
  exact.
* `tx_valid` pulses for one cycle with the descriptor, the finish time and
  `T`. The packet's WQE-buffer entry is freed at the same time.

The WQE buffer (`wqe_buffer`) stores each packet's descriptor and finish time
once. Only a 7-bit handle travels through the wheel and the sorter.

## Interfaces of `tassel_top`

The top's ports lead to the NIC parts that are not part of this design.
All streams use valid/ready handshakes.

| group | direction | meaning |
|---|---|---|
| `db_*` | in | doorbell: QP and new producer index |
| `cc_*` | in | rate update: QP, rate (100 kb/s units, 0 = stop), typical packet size |
| `dma_req_*` | out | fetch `nwqe` WQEs of a QP starting at ring index `idx` |
| `wqe_*` | in | the fetched WQEs (address, message length), in request order |
| `tx_*` | out | packet to send: descriptor (QP, WQE index, address, length), F, T |
| `pfc_pause` | in | freeze the timer |
| `now`, `timer_step`, `ready`, `events` | out | system time, `min(1, 1/Phi)` with 8 fraction bits, reset sweep done, per-mechanism pulses |

After reset, the QP context memory and the heap are cleared, one entry per
cycle (16 K cycles), before `ready` rises.

## How far it can be trusted

Every block has a self-checking testbench in `tb/` that compares it with a
reference model. `tassel_top_tb` runs the whole design at its default size
(16 K QPs) against a behavioural host and DMA model with a 200-cycle fetch
latency. It checks the following:

* A 25 Gb/s flow gets a batch of 3 and reaches 25.0 Gb/s.
* Four flows at 25, 10, 1 and 40 Gb/s each get their limit within 3 %. The
  40 Gb/s flow has 8 KB messages cut into 8 packets.
* When more flows oversubscribe the link (Phi = 2.36), the timer slows down.
  Every flow gets 0.42 of its limit (`1/Phi` = 0.424), and the link carries
  99.7 Gb/s.
* During a pause, time stands still and nothing is sent; sending resumes
  after.

The test also counts how often each mechanism fired: scheduling, batching,
imminent and distant packets, draining, link waits and oversubscription.

For small packets, `packet_scheduler_tb` sends 128 back-to-back 100-byte
packets. They leave in 254 cycles, one every two cycles.

Known departures and limits:

* **Timer under oversubscription.** The timer's update rule as published,
  `T += delta * max(1, Phi)`, would speed time up. Its description, and the
  measured result that each flow gets half its limit at `Phi = 2`, need time
  to slow down. This design slows it down (`T += delta / max(1, Phi)`).
* **Packet rate.** The packet tier sustains one packet every two cycles
  (125 Mpps), bounded by the register array. The flow tier issues one fetch
  per four cycles, so at that packet rate flows must be fast enough for
  batches of two or more.
* **Not modelled.** Congestion-control credits are not modelled (a rate of 0
  stops a flow). The DMA engine, RDMA transport and MAC are outside the design.
* **Sizes.** `MTU` (1024), `MAX_BATCH` (64), the 128-entry packet tier, the
  number formats and the reset sweep are this design's own choices.

## Simulating

Each testbench is a top-level module in `tb/` with the same name as its file.
For example:

    verilator --binary --timing --assert -Wno-fatal -y rtl \
        rtl/tassel_pkg.sv tb/tassel_top_tb.sv --top-module tassel_top_tb
    ./obj_dir/Vtassel_top_tb

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.
`tassel_top_tb` simulates about 190,000 cycles at full size and runs in well
under a second. Smaller configurations are reached through the top's
parameters. `NUM_QPS` must not exceed `2^HEAP_LEVELS - 1`, and
`IMMINENT_MAX` must be a power of two.
