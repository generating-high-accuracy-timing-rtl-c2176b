// synchronizer: validates every GPS pulse against the time window and
// decides when a measurement may be saved.
//
// A pulse is valid when the dividend counter of the divider, read in the
// strobe cycle, lies within [lo, hi]. When the counter passes hi without a
// pulse (a missing pulse), the counters of the divider are frozen through
// count_en so they cannot overflow, and the next pulse, whatever its time, is
// invalid. Right after reset there is no previous pulse, so the first pulse
// is invalid too. Consecutive valid pulses are counted; a measurement is
// saved only once MIN_GOOD valid pulses in a row have been seen, and every
// invalid or missing pulse restarts that count.
//
// Interface: pulse (one-cycle strobe), dividend, lo, hi in; count_en to the
// divider, save (one-cycle strobe, store the measurement), acquire (one-cycle
// strobe on the save that ends a run of bad pulses or start-up), tracking
// (level: the last MIN_GOOD pulses were valid), bad (one-cycle strobe for a
// rejected pulse) and missing (one-cycle strobe when the counter passes hi).
// A period that runs past hi freezes the counter at hi + 2.
// Timing: save, acquire and bad are combinational in the strobe cycle so the
// measurement can be written on that same clock edge.
// The window test, the counter freeze and the wait for consecutive good
// pulses follow the design description; MIN_GOOD = 3 is this design's
// choice.
module synchronizer
  import gps_timing_pkg::*;
#(
  parameter int unsigned MIN_GOOD = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pulse,
  input  len_t dividend,
  input  len_t lo,
  input  len_t hi,
  output logic count_en,
  output logic save,
  output logic acquire,
  output logic tracking,
  output logic bad,
  output logic missing
);

  localparam int GW = $clog2(MIN_GOOD + 1);

  logic          over_q;   // no valid reference for the running count
  logic [GW-1:0] good_q;   // consecutive valid pulses, saturating at MIN_GOOD
  logic          in_window;
  logic          valid;
  logic [GW:0]   good_inc;

  assign in_window = (dividend >= lo) && (dividend <= hi);
  assign valid     = pulse && !over_q && in_window;
  assign bad       = pulse && !valid;
  assign missing   = !pulse && !over_q && (dividend > hi);
  assign good_inc  = {1'b0, good_q} + 1'b1;
  assign save      = valid && (good_inc >= (GW+1)'(MIN_GOOD));
  assign acquire   = valid && (good_inc == (GW+1)'(MIN_GOOD));
  assign count_en  = !over_q;
  assign tracking  = (good_q == GW'(MIN_GOOD));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      over_q <= 1'b1;
      good_q <= '0;
    end else if (pulse) begin
      over_q <= 1'b0;
      if (!valid)                             good_q <= '0;
      else if (good_q != GW'(MIN_GOOD))       good_q <= good_q + 1'b1;
    end else if (missing) begin
      over_q <= 1'b1;
      good_q <= '0;
    end
  end

  // A measurement is stored, and the window is left, only on a pulse.
  always_ff @(posedge clk)
    if (rst_n) begin
      a_save_on_pulse: assert (!(save || acquire || bad) || pulse);
      a_acquire_saves: assert (!acquire || save);
    end

  initial assert (MIN_GOOD >= 1) else $error("synchronizer: MIN_GOOD must be at least 1");

endmodule
