// divider: measures the 1PPS period in master clocks and divides it by the
// output/reference frequency ratio while it counts.
//
// Three counters run together. The dividend counts master-clock cycles since
// the last pulse strobe. The remainder counter counts the same cycles modulo
// DIVISOR (= F_out / F_ref), and the quotient counter is incremented each
// time the remainder counter wraps. When the next strobe arrives the three
// registers already hold period, period / DIVISOR and period % DIVISOR, so no
// division hardware and no extra time are needed after the pulse.
//
// Interface: pulse restarts the measurement (the registers are read by the
// consumer in the same cycle, and hold the count of the period just ended);
// count_en low freezes all three counters (used to stop them once the period
// has exceeded its upper bound, so that they cannot overflow).
// Timing: in the cycle of a strobe, dividend equals the number of clock
// cycles since the previous strobe. After a strobe the counters behave as if
// they had been cleared and then advanced once.
// The three-counter scheme is the one described for this design; the
// counter width and the synchronous restart are this design's choices.
module divider
  import gps_timing_pkg::*;
#(
  parameter int unsigned DIVISOR = F_OUT_DEFAULT / F_REF_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pulse,
  input  logic count_en,
  output len_t dividend,
  output len_t quotient,
  output len_t remainder
);

  len_t cnt_q, quo_q, rem_q;
  len_t cnt_base, quo_base, rem_base;
  len_t cnt_d, quo_d, rem_d;

  // Values the counters step from: zero right after a strobe.
  always_comb begin
    if (pulse) begin
      cnt_base = '0;
      quo_base = '0;
      rem_base = '0;
    end else begin
      cnt_base = cnt_q;
      quo_base = quo_q;
      rem_base = rem_q;
    end
    cnt_d = cnt_base + 1'b1;
    if (rem_base == len_t'(DIVISOR - 1)) begin
      rem_d = '0;
      quo_d = quo_base + 1'b1;
    end else begin
      rem_d = rem_base + 1'b1;
      quo_d = quo_base;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q <= '0;
      quo_q <= '0;
      rem_q <= '0;
    end else if (pulse || count_en) begin
      cnt_q <= cnt_d;
      quo_q <= quo_d;
      rem_q <= rem_d;
    end
  end

  assign dividend  = cnt_q;
  assign quotient  = quo_q;
  assign remainder = rem_q;

  initial assert (DIVISOR >= 1) else $error("divider: DIVISOR must be at least 1");

endmodule
