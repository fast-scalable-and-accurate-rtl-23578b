// tassel_pkg: types and constants shared by the hierarchical rate limiter.
//
// Time is counted in ticks of one 250 MHz clock period (4 ns). Scheduling
// keys (the rank and predicate fields of the sorters) are 24-bit tick counts
// that wrap; they are compared with time_before(), which is correct as long as
// two compared times are less than 2^23 ticks (33 ms) apart. Inside the flow
// context times carry TFRAC extra fraction bits so that per-packet gaps that
// are not whole ticks (1024 B at 100 Gb/s is 20.48 ticks) do not lose accuracy.
//
// Rates are integers in units of 100 kb/s, the smallest rate and the
// adjustment step of the limiter; 100 Gb/s is 1,000,000 units.
//
// The 24-bit timestamp, the 250 MHz clock, the 100 kb/s step and the
// 1 us scheduling latency follow the paper; the fixed-point formats are this
// design's own choice.
package tassel_pkg;

  localparam int unsigned TS_W   = 24;   // timestamp width (ticks)
  localparam int unsigned TFRAC  = 8;    // fraction bits of flow-context times
  localparam int unsigned RATE_W = 20;   // rate in 100 kb/s units
  localparam int unsigned LEN_W  = 16;   // packet / message-chunk length in bytes
  localparam int unsigned ADDR_W = 48;   // host address of packet data
  localparam int unsigned IDX_W  = 16;   // WQE ring index
  localparam int unsigned INV_W  = 32;   // ticks-per-byte, 16 fraction bits
  localparam int unsigned INV_FRAC = 16;

  // Ticks needed to send one byte at a rate of one unit (100 kb/s) with a
  // 4 ns tick: 8 bit / 1e5 bit/s / 4e-9 s = 20000.
  localparam int unsigned TICKS_PER_BYTE_AT_UNIT = 20000;

  typedef logic [TS_W-1:0]          ts_t;
  typedef logic [TS_W+TFRAC-1:0]    tsf_t;   // timestamp with fraction
  typedef logic [RATE_W-1:0]        rate_t;
  typedef logic [LEN_W-1:0]         len_t;
  typedef logic [ADDR_W-1:0]        addr_t;
  typedef logic [IDX_W-1:0]         idx_t;
  typedef logic [INV_W-1:0]         inv_t;

  // a is strictly earlier than b on the wrapping time line
  function automatic logic time_before(ts_t a, ts_t b);
    ts_t d;
    d = a - b;
    return d[TS_W-1];
  endfunction

  // a is earlier than or equal to b
  function automatic logic time_le(ts_t a, ts_t b);
    return !time_before(b, a);
  endfunction

  // One work-queue element as returned by the DMA engine.
  typedef struct packed {
    addr_t addr;     // host address of the message data
    logic [31:0] msg_len;  // message length in bytes (64 B .. 2 GB)
  } wqe_t;

  // One packet of a fetched message, as stored for an imminent packet.
  typedef struct packed {
    logic [15:0] qpn;
    idx_t        wqe_idx;
    addr_t       addr;
    len_t        len;
  } pkt_desc_t;

  // Scheduling events gathered by the event mux for the QP scheduler.
  typedef enum logic [1:0] {
    EV_DOORBELL = 2'd0,   // host posted WQEs: idx = new producer index
    EV_RATE     = 2'd1,   // congestion control set a rate: rate, size
    EV_RESCHED  = 2'd2    // packet scheduler returns a flow: key, start, idx, off
  } ev_kind_e;

  typedef struct packed {
    ev_kind_e    kind;
    logic [15:0] qpn;
    idx_t        idx;
    rate_t       rate;
    len_t        size;     // typical packet size of the flow, bytes
    ts_t         key;
    tsf_t        start;
    logic [31:0] off;
  } event_t;

endpackage
