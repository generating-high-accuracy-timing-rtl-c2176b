// gps_timing_top: GPS-disciplined timing generator. From the 1PPS pulse of
// an inexpensive GPS receiver and a free-running master clock it builds a
// low-jitter 1PPS output and a clock of F_OUT (10 MHz) whose cycles are
// aligned with that 1PPS, with exactly F_OUT/F_REF cycles per second.
//
// Signal flow:
//   gps_pps -> pps_sampler -> one-cycle strobe per GPS pulse
//   strobe  -> clock_manager: measures each GPS period in master clocks,
//              divides it by F_OUT/F_REF while counting, rejects pulses
//              outside the time window, and after MIN_GOOD consecutive good
//              pulses stores the measurement and signals "acquire".
//   acquire -> 1PPS clock_builder restarts on that GPS pulse with the
//              measured period; pid_controller starts from the same period.
//   every second the delay_meter measures the signed delay from the internal
//   1PPS edge to the GPS edge, and the pid_controller sets the length of the
//   next internal seconds from it (P = 1/8, I = 1/32 by default).
//   the fast clock_builder restarts at every internal 1PPS edge and builds
//   quotient-long cycles, stretched by one clock whenever the accumulated
//   remainder overflows, and at most F_OUT/F_REF of them per second.
//   When GPS pulses stop or fail the window, the internal 1PPS keeps running
//   on its last length for HOLDOVER seconds and then stops, and the fast
//   clock with it.
//
// Interface: clk is the master clock (F_CLK), rst_n a synchronous active-low
// reset, gps_pps the raw receiver pin, dyn_bounds selects the dynamic time
// window. pps_out (pulse of PULSE_WIDTH clocks), clk_out (square wave), and
// status: locked (last MIN_GOOD GPS pulses valid), running (outputs being
// built), holdover (running without a locked receiver), plus the stored
// period, the last phase error and the current internal second length, and
// one-cycle strobes for a GPS pulse rejected by the window and for a GPS
// pulse found missing.
// Timing: the internal 1PPS edge is driven to coincide with the GPS strobe
// delayed by one clock, i.e. 4 clocks after the pin is first sampled high.
// The structure follows the design description; the holdover limit, the
// one-clock alignment delay and feeding the loop only with pulses inside the
// window are this design's choices.
module gps_timing_top
  import gps_timing_pkg::*;
#(
  parameter int unsigned F_CLK       = F_CLK_DEFAULT,
  parameter int unsigned F_OUT       = F_OUT_DEFAULT,
  parameter int unsigned F_REF       = F_REF_DEFAULT,
  parameter int unsigned HOLDOFF     = 64,
  parameter int unsigned DELTA_SHIFT = 12,
  parameter int unsigned MIN_GOOD    = 3,
  parameter int unsigned KP_SHIFT    = 3,
  parameter int unsigned KI_SHIFT    = 5,
  parameter int unsigned KD_SHIFT    = 0,
  parameter bit          KD_EN       = 1'b0,
  parameter int unsigned FRAC        = 8,
  parameter int unsigned HOLDOVER    = 60,
  parameter int unsigned PULSE_WIDTH = F_CLK / F_REF / 10_000
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   gps_pps,
  input  logic   dyn_bounds,
  output logic   pps_out,
  output logic   clk_out,
  output logic   locked,
  output logic   running,
  output logic   holdover,
  output len_t   period,
  output delay_t phase_err,
  output len_t   pps_len,
  output logic   gps_rejected,
  output logic   gps_missing
);

  localparam int unsigned NOMINAL = F_CLK / F_REF;
  localparam int unsigned DIVISOR = F_OUT / F_REF;

  // input sampling
  logic gps_pulse, gps_level;

  pps_sampler #(.HOLDOFF(HOLDOFF)) u_sampler (
    .clk, .rst_n, .pps_in(gps_pps), .pps_pulse(gps_pulse), .pps_level(gps_level)
  );

  // measurement, check and storage
  lengths_t measured, lengths;
  logic     lengths_valid, save, acquire, tracking, bad, missing;

  clock_manager #(
    .NOMINAL(NOMINAL), .DIVISOR(DIVISOR),
    .DELTA_SHIFT(DELTA_SHIFT), .MIN_GOOD(MIN_GOOD)
  ) u_manager (
    .clk, .rst_n, .pulse(gps_pulse), .dyn_mode(dyn_bounds),
    .measured, .lengths, .lengths_valid,
    .save, .acquire, .tracking, .bad, .missing
  );

  // internal 1PPS
  logic pps_start, pps_wrap, pps_active, pps_restart;
  len_t pid_len;

  assign pps_restart = acquire && !pps_active;

  clock_builder #(.DIVISOR(1)) u_pps_builder (
    .clk, .rst_n,
    .en(lengths_valid || pps_restart),
    .restart(pps_restart),
    .rearm(save),
    .len(pps_restart ? measured.period : pid_len),
    .rem('0),
    .pulse_mode(1'b1),
    .pulse_width(len_t'(PULSE_WIDTH)),
    .max_cycles(len_t'(HOLDOVER)),
    .out(pps_out),
    .start(pps_start),
    .wrap(pps_wrap),
    .active(pps_active)
  );

  // fast output clock, realigned at every internal second
  logic hf_restart, hf_start, hf_wrap, hf_active;

  assign hf_restart = pps_restart || (pps_wrap && pps_active);

  // The fast builder keeps one quotient/remainder pair for a whole second,
  // so that its F_OUT/F_REF cycles add up to one stored period even when a
  // new measurement is stored in the middle of the second.
  len_t hf_len_q, hf_rem_q, hf_len, hf_rem;

  assign hf_len = pps_restart ? measured.quotient  : lengths.quotient;
  assign hf_rem = pps_restart ? measured.remainder : lengths.remainder;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hf_len_q <= '0;
      hf_rem_q <= '0;
    end else if (hf_restart) begin
      hf_len_q <= hf_len;
      hf_rem_q <= hf_rem;
    end
  end

  clock_builder #(.DIVISOR(DIVISOR)) u_hf_builder (
    .clk, .rst_n,
    .en(lengths_valid || pps_restart),
    .restart(hf_restart),
    .rearm(1'b0),
    .len(hf_restart ? hf_len : hf_len_q),
    .rem(hf_restart ? hf_rem : hf_rem_q),
    .pulse_mode(1'b0),
    .pulse_width('0),
    .max_cycles(len_t'(DIVISOR)),
    .out(clk_out),
    .start(hf_start),
    .wrap(hf_wrap),
    .active(hf_active)
  );

  // phase error between internal and GPS second, and the control loop
  logic   gps_ok_d;
  delay_t dm_delay;
  logic   dm_valid, dm_timeout;

  always_ff @(posedge clk) begin
    if (!rst_n) gps_ok_d <= 1'b0;
    else        gps_ok_d <= gps_pulse && !bad;
  end

  delay_meter #(.MAX_DELAY(NOMINAL / 4)) u_delay (
    .clk, .rst_n,
    .int_edge(pps_start),
    .gps_edge(gps_ok_d),
    .delay(dm_delay),
    .valid(dm_valid),
    .timeout(dm_timeout)
  );

  logic [CNT_W+FRAC-1:0] pid_len_fix;
  logic signed [47:0]    pid_integ;

  pid_controller #(
    .KP_SHIFT(KP_SHIFT), .KI_SHIFT(KI_SHIFT), .KD_SHIFT(KD_SHIFT),
    .KD_EN(KD_EN), .FRAC(FRAC)
  ) u_pid (
    .clk, .rst_n,
    .init(pps_restart),
    .base_in(measured.period),
    .e_valid(dm_valid && pps_active),
    .e(dm_delay),
    .len_out(pid_len),
    .len_fix(pid_len_fix),
    .integ(pid_integ)
  );

  assign locked    = tracking;
  assign running   = pps_active;
  assign holdover  = pps_active && !tracking;
  assign period    = lengths.period;
  assign phase_err = dm_delay;
  assign pps_len   = pid_len;
  assign gps_rejected = bad;
  assign gps_missing  = missing;

endmodule
