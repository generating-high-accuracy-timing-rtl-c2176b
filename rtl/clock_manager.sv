// clock_manager: measures the GPS 1PPS period, checks it and keeps the last
// good measurement.
//
// It groups the divider (period, quotient and remainder counters), the
// bounds memory (time window), the synchronizer (window check, counter
// freeze, consecutive-good rule) and the lengths memory (last accepted
// measurement). Its results are the length of one reference period and the
// length of one output cycle (quotient plus remainder to recover), both in
// master clocks, and an acquire strobe that starts the output builders when
// the receiver is locked onto for the first time or again after a loss.
//
// Interface: pulse is the one-cycle strobe of pps_sampler; dyn_mode selects
// the dynamic window. measured shows the running counters (in a strobe
// cycle: the period just ended, before it is stored). lengths/lengths_valid come from the lengths memory;
// save, acquire, bad and missing are one-cycle strobes; tracking is a level.
// Timing: a pulse accepted in cycle t is visible on lengths in cycle t+1.
// The grouping and the task of each part follow the design description.
module clock_manager
  import gps_timing_pkg::*;
#(
  parameter int unsigned NOMINAL     = F_CLK_DEFAULT / F_REF_DEFAULT,
  parameter int unsigned DIVISOR     = F_OUT_DEFAULT / F_REF_DEFAULT,
  parameter int unsigned DELTA_SHIFT = 12,
  parameter int unsigned MIN_GOOD    = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     pulse,
  input  logic     dyn_mode,
  output lengths_t measured,
  output lengths_t lengths,
  output logic     lengths_valid,
  output logic     save,
  output logic     acquire,
  output logic     tracking,
  output logic     bad,
  output logic     missing
);

  len_t     dividend, quotient, remainder;
  len_t     lo, hi;
  logic     count_en;
  lengths_t meas;

  divider #(.DIVISOR(DIVISOR)) u_divider (
    .clk, .rst_n, .pulse, .count_en,
    .dividend, .quotient, .remainder
  );

  bounds_memory #(.NOMINAL(NOMINAL), .DELTA_SHIFT(DELTA_SHIFT)) u_bounds (
    .clk, .rst_n, .dyn_mode,
    .update(save), .period_in(dividend),
    .lo, .hi
  );

  synchronizer #(.MIN_GOOD(MIN_GOOD)) u_sync (
    .clk, .rst_n, .pulse, .dividend, .lo, .hi,
    .count_en, .save, .acquire, .tracking, .bad, .missing
  );

  assign meas     = '{period: dividend, quotient: quotient, remainder: remainder};
  assign measured = meas;

  lengths_memory u_lengths (
    .clk, .rst_n, .save, .din(meas),
    .dout(lengths), .valid(lengths_valid)
  );

endmodule
