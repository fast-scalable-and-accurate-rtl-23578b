// register_array: sorted list of eligible packets, ordered by finish time.
//
// Tier 2 rank sorting. DEPTH entries of {finish time, handle} are kept in
// ascending order of finish time in registers, with the classic parallel
// compare-and-shift structure: on enqueue every entry compares its key with
// the new one at once, the entries behind the insertion point shift one
// place back and the new entry drops into the gap; on dequeue the head
// leaves and every entry shifts one place forward. Equal keys keep arrival
// order.
//
// Each operation takes two cycles, as in the paper (compare, then shift):
// enq_ready / deq and the head outputs are valid in the first cycle, the
// shift happens in the second. An enqueue and a dequeue offered in the same
// cycle are done together in one operation: the head leaves, the entries in
// front of the insertion point move forward and the new entry drops in
// behind them, so one packet can enter and one leave every two cycles (125
// Mpps at 250 MHz). head_valid, head_key and head_handle show the packet
// with the smallest finish time.
module register_array
  import tassel_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned HW    = 7     // handle width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enq_valid,
  output logic          enq_ready,
  input  ts_t           enq_key,
  input  logic [HW-1:0] enq_handle,
  output logic          head_valid,
  output ts_t           head_key,
  output logic [HW-1:0] head_handle,
  input  logic          deq,          // take the head (only when head_valid)
  output logic          full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  typedef struct packed {
    logic          valid;
    ts_t           key;
    logic [HW-1:0] handle;
  } ent_t;

  ent_t             ent [DEPTH];
  logic             phase_q;        // 1: shift cycle
  logic             op_deq_q, op_enq_q;
  ent_t             new_q;
  logic [DEPTH:0]   before_q;       // new entry goes in front of entry i
                                    // (entry DEPTH: always, past the end)

  logic idle, take_deq, take_enq;

  assign idle        = !phase_q;
  assign full        = ent[DEPTH-1].valid;
  assign head_valid  = idle && ent[0].valid;
  assign head_key    = ent[0].key;
  assign head_handle = ent[0].handle;
  assign take_deq    = idle && deq && ent[0].valid;
  assign enq_ready   = idle && (!full || (deq && ent[0].valid));
  assign take_enq    = enq_valid && enq_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q  <= 1'b0;
      op_deq_q <= 1'b0;
      op_enq_q <= 1'b0;
      new_q    <= '0;
      before_q <= '0;
      count    <= '0;
      for (int i = 0; i < DEPTH; i++) ent[i] <= '0;
    end else if (idle) begin
      if (take_deq || take_enq) begin
        // cycle 1: compare
        phase_q  <= 1'b1;
        op_deq_q <= take_deq;
        op_enq_q <= take_enq;
        new_q    <= '{valid: 1'b1, key: enq_key, handle: enq_handle};
        for (int i = 0; i < DEPTH; i++)
          before_q[i] <= !ent[i].valid || time_before(enq_key, ent[i].key);
        before_q[DEPTH] <= 1'b1;
      end
    end else begin
      // cycle 2: shift
      phase_q <= 1'b0;
      if (op_deq_q && !op_enq_q) begin
        // the head leaves, everything moves forward
        for (int i = 0; i < DEPTH - 1; i++) ent[i] <= ent[i+1];
        ent[DEPTH-1] <= '0;
        count <= count - 1'b1;
      end else if (op_enq_q && !op_deq_q) begin
        // entries behind the insertion point move back one place
        for (int i = 0; i < DEPTH; i++) begin
          if (before_q[i]) begin
            if (i > 0 && before_q[(i > 0) ? i - 1 : 0]) ent[i] <= ent[(i > 0) ? i - 1 : 0];
            else                                        ent[i] <= new_q;
          end
        end
        count <= count + 1'b1;
      end else if (op_enq_q && op_deq_q) begin
        // both: entries in front of the insertion point move forward one
        // place, the new entry takes the place just before it, the rest stay
        for (int i = 0; i < DEPTH; i++) begin
          if (!before_q[i+1])  ent[i] <= (i < DEPTH - 1) ? ent[(i < DEPTH - 1) ? i + 1 : i] : '0;
          else if (!before_q[i] || i == 0) ent[i] <= new_q;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (rst_n && !idle && op_enq_q && !op_deq_q)
      assert (!ent[DEPTH-1].valid) else $error("register_array: enqueue into a full array");
endmodule
