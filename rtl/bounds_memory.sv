// bounds_memory: the "clock length bounds memory", which defines the time
// window inside which a GPS pulse must arrive to be accepted.
//
// The window is centre +/- delta with delta = centre / 2**DELTA_SHIFT, a
// shift rather than a division. In static mode (dyn_mode = 0) the centre is
// the nominal period NOMINAL, fixed at build time. In dynamic mode
// (dyn_mode = 1) the centre is the last period that was accepted and saved;
// until a period has been saved, and after reset, it is NOMINAL.
//
// Interface: update is a one-cycle strobe that loads period_in as the new
// dynamic centre; lo and hi are the inclusive bounds on the period count.
// Timing: lo/hi follow a mode change combinationally and an update one
// cycle later.
// Both modes and the 1/2**N delta of the dynamic mode follow the design
// description; applying the same 1/2**N delta in static mode and the
// default DELTA_SHIFT = 12 (about +/-244 ppm) are this design's choices.
module bounds_memory
  import gps_timing_pkg::*;
#(
  parameter int unsigned NOMINAL     = F_CLK_DEFAULT / F_REF_DEFAULT,
  parameter int unsigned DELTA_SHIFT = 12
) (
  input  logic clk,
  input  logic rst_n,
  input  logic dyn_mode,
  input  logic update,
  input  len_t period_in,
  output len_t lo,
  output len_t hi
);

  len_t dyn_center_q;
  len_t center, delta;

  always_ff @(posedge clk) begin
    if (!rst_n)      dyn_center_q <= len_t'(NOMINAL);
    else if (update) dyn_center_q <= period_in;
  end

  always_comb begin
    center = dyn_mode ? dyn_center_q : len_t'(NOMINAL);
    delta  = center >> DELTA_SHIFT;
    lo     = center - delta;
    hi     = center + delta;
  end

endmodule
