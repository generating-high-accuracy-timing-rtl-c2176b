// gps_timing_pkg: types and default constants shared by the GPS-disciplined
// timing generator.
//
// All lengths are counts of master-clock cycles. A 32-bit count holds a
// one-second period at any master clock up to 4.29 GHz, which covers the
// 50 MHz and 70 MHz operating points. Signed delays and PID terms use the same
// width plus a guard so the integrator does not wrap in practice.
package gps_timing_pkg;

  localparam int CNT_W = 32;   // width of every length / period count
  localparam int DLY_W = 32;   // width of the signed phase error

  typedef logic [CNT_W-1:0]        len_t;
  typedef logic signed [DLY_W-1:0] delay_t;

  // Result of one 1PPS period measurement: the period itself and the
  // integer division of the period by the output/reference frequency ratio.
  typedef struct packed {
    len_t period;    // master clocks between two valid GPS pulses
    len_t quotient;  // period / DIVISOR: master clocks per output cycle
    len_t remainder; // period % DIVISOR: fraction to recover while building
  } lengths_t;

  // Defaults of the main configuration: 50 MHz master clock, 10 MHz output,
  // 1 Hz reference.
  localparam int unsigned F_CLK_DEFAULT = 50_000_000;
  localparam int unsigned F_OUT_DEFAULT = 10_000_000;
  localparam int unsigned F_REF_DEFAULT = 1;

endpackage
