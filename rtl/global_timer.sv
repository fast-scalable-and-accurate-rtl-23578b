// global_timer: the system time T shared by both tiers of the rate limiter.
//
// Phi is the sum of the rate limits of all active flows divided by the link
// rate. While the link is not oversubscribed (Phi <= 1) T counts clock
// periods, one tick (4 ns at 250 MHz) per cycle. When it is oversubscribed T
// is slowed down to 1/Phi tick per cycle: every flow then becomes eligible at
// its rate divided by Phi, the sum of those rates is the link rate, and the
// link is shared in proportion to the limits (Phi = 2: each flow gets half
// of its limit). While pause is high (a PFC pause from downstream) T stands
// still.
//
// 1/Phi is recomputed continuously by a sequential divider from rate_sum
// (units of 100 kb/s), so a change of the active rates takes effect about
// PHI_W+2 cycles later; the step is kept with PHI_FRAC fraction bits (at
// least 1/256 tick per cycle) and the time with TFRAC fraction bits. Slowing
// the time by Phi under oversubscription and the pause follow the paper; the
// fixed-point format and the recompute latency are this design's choice.
//
// Outputs: now (24-bit ticks) and now_f (with fraction bits); step_q is the
// current per-cycle increment min(1, 1/Phi) in PHI_FRAC fixed point
// (1.0 = 2^PHI_FRAC).
module global_timer
  import tassel_pkg::*;
#(
  parameter int unsigned LINK_RATE = 1_000_000,  // link rate, 100 kb/s units
  parameter int unsigned SUM_W     = 36,         // width of rate_sum
  parameter int unsigned PHI_FRAC  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pause,
  input  logic [SUM_W-1:0] rate_sum,
  output ts_t              now,
  output tsf_t             now_f,
  output logic [15:0]      step_q
);
  localparam int unsigned PHI_W = SUM_W + PHI_FRAC;
  localparam logic [15:0] ONE = 16'(1 << PHI_FRAC);

  logic             div_busy, div_done, div_start;
  logic [PHI_W-1:0] div_quot;
  tsf_t             acc_q;
  logic             div_start_hold;
  logic             over, over_q;      // oversubscribed, and at divider start

  assign over = rate_sum > SUM_W'(LINK_RATE);

  // restart the divider as soon as it finishes
  assign div_start = !div_busy && !div_start_hold;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      div_start_hold <= 1'b0;
      over_q         <= 1'b0;
    end else begin
      div_start_hold <= div_start;
      if (div_start) over_q <= over;
    end

  seq_divider #(.W(PHI_W)) u_div (
    .clk, .rst_n,
    .start(div_start),
    .num(PHI_W'(LINK_RATE) << PHI_FRAC),
    .den(over ? PHI_W'(rate_sum) : PHI_W'(1)),
    .busy(div_busy),
    .done(div_done),
    .quot(div_quot)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_q    <= ONE;
      acc_q     <= '0;
    end else begin
      if (div_done) begin
        if (!over_q)                  step_q <= ONE;
        else if (div_quot == '0)      step_q <= 16'd1;
        else if (div_quot >= PHI_W'(ONE)) step_q <= ONE;
        else                          step_q <= div_quot[15:0];
      end
      if (!pause)
        acc_q <= acc_q + tsf_t'({8'd0, step_q, {TFRAC{1'b0}}} >> PHI_FRAC);
    end
  end

  assign now_f = acc_q;
  assign now   = acc_q[TS_W+TFRAC-1:TFRAC];
endmodule
