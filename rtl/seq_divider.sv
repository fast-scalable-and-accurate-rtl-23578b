// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// Pulse start with num and den stable for that cycle; W cycles later done
// pulses for one cycle and quot holds num/den (floor) until the next start.
// Callers never divide by zero. Used off the packet path, for
// per-flow constants that change only when congestion control sets a new
// rate, and for the oversubscription factor of the timer. The algorithm is
// textbook; the rate limiter only needs the quotients.
module seq_divider #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quot
);
  logic [W-1:0]  rem_q, den_q, q_q;
  logic [$clog2(W+1)-1:0] cnt_q;
  logic [W:0]    trial;

  always_comb trial = {rem_q, q_q[W-1]} - {1'b0, den_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q <= '0; den_q <= '0; q_q <= '0; cnt_q <= '0;
      busy <= 1'b0; done <= 1'b0; quot <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem_q <= '0;
        q_q   <= num;
        den_q <= den;
        cnt_q <= W[$clog2(W+1)-1:0];
        busy  <= 1'b1;
      end else if (busy) begin
        // shift the next dividend bit into the remainder
        if (!trial[W]) begin
          rem_q <= trial[W-1:0];
          q_q   <= {q_q[W-2:0], 1'b1};
        end else begin
          rem_q <= {rem_q[W-2:0], q_q[W-1]};
          q_q   <= {q_q[W-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= (!trial[W]) ? {q_q[W-2:0], 1'b1} : {q_q[W-2:0], 1'b0};
        end
      end
    end
  end
endmodule
