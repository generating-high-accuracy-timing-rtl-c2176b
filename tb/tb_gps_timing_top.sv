// tb_gps_timing_top: end-to-end run of the timing generator at a reduced
// scale (10 kHz master clock, 1 kHz output, 1 Hz reference, so one second is
// 10,000 clocks) against a GPS model whose second lasts 10,003 clocks (a
// master clock 300 ppm slow), with +/-2 clocks of jitter and bouncing edges
// that arrive asynchronously to the clock.
//
// Scenario: lock, tracking, one spurious pulse (rejected, holdover while the
// receiver is re-validated), an outage longer than the holdover limit
// (outputs stop), reacquisition, then tracking with the dynamic window.
// Checked independently of the design: output seconds contain exactly
// F_OUT/F_REF fast cycles, fast and 1PPS rising edges coincide, the 1PPS
// pulse width, the output second length and its phase against the GPS
// pin, the stop after the holdover limit and the restart. Every mechanism
// (acquire, reject, missing pulse, holdover, holdover expiry, fraction
// recovery, loop correction, fast-clock period limit, dynamic window) is
// counted and must occur at least once.
module tb_gps_timing_top;
  import gps_timing_pkg::*;

  localparam int F_CLK = 10_000, F_OUT = 1_000, F_REF = 1;
  localparam int DIV = F_OUT / F_REF;
  localparam int GPS_T = 10_003;           // GPS second in master clocks
  localparam int JIT = 2;
  localparam int PW = 100;
  localparam int HOLDOVER = 8;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   gps_pps = 1'b0, dyn_bounds = 1'b0;
  logic   pps_out, clk_out, locked, running, holdover;
  len_t   period, pps_len;
  delay_t phase_err;
  logic   gps_rejected, gps_missing;

  gps_timing_top #(
    .F_CLK(F_CLK), .F_OUT(F_OUT), .F_REF(F_REF), .HOLDOFF(8), .DELTA_SHIFT(6),
    .MIN_GOOD(3), .HOLDOVER(HOLDOVER), .PULSE_WIDTH(PW)
  ) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;

  // mechanism counters
  int ev_acquire = 0, ev_reject = 0, ev_missing = 0, ev_holdover = 0, ev_expiry = 0;
  int ev_stretch = 0, ev_correct = 0, ev_hf_limit = 0, ev_dynamic = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (cycle %0d)", msg, cycle); end
  endtask

  // ---------------- GPS model ----------------
  longint gps_rise = -1;       // cycle of the last pin rising edge
  task automatic gps_pulse_at(input longint c);
    while (cycle < c) @(posedge clk);
    #($urandom_range(1, 9));
    gps_pps = 1'b1;
    gps_rise = c;
    // bounce on the slow rising edge
    repeat (2) begin
      #($urandom_range(2, 8)) gps_pps = 1'b0;
      #($urandom_range(2, 8)) gps_pps = 1'b1;
    end
    repeat (200) @(posedge clk);
    gps_pps = 1'b0;
  endtask

  // ---------------- output monitor ----------------
  logic   pps_q = 1'b0, clk_q = 1'b0, running_q = 1'b0, hold_q = 1'b0;
  longint pps_rise = -1, prev_pps_rise = -1;
  int     hf_edges = 0, hf_len = 0, pps_high = 0;
  logic   hf_active_q = 1'b0;
  int     seconds_in_run = 0;
  bit     settled = 0;
  longint acq_cycle = -1;
  bit     final_phase = 0;

  always @(negedge clk) if (rst_n) begin
    // fast clock: count edges, measure periods
    if (clk_out && !clk_q) begin
      hf_edges++;
      if (hf_len == int'(period / DIV) + 1) ev_stretch++;
      hf_len = 0;
    end
    hf_len++;
    // fast builder reached its F_OUT/F_REF cycles before the next 1PPS edge
    if (running && hf_active_q && !dut.u_hf_builder.active) ev_hf_limit++;
    hf_active_q = dut.u_hf_builder.active;

    // internal 1PPS
    if (pps_out) pps_high++;
    if (!pps_out && pps_q) begin
      check(pps_high == PW, $sformatf("1PPS pulse width %0d", pps_high));
      pps_high = 0;
    end
    if (pps_out && !pps_q) begin
      if (seconds_in_run > 0) check(clk_out && !clk_q, "fast clock rises with the 1PPS");
      prev_pps_rise = pps_rise;
      pps_rise = cycle;
      if (seconds_in_run > 0) begin
        // hf_edges includes the edge of this second's start
        check(hf_edges == DIV + 1, $sformatf("%0d fast cycles in a second", hf_edges - 1));
        if (settled)
          check((pps_rise - prev_pps_rise) >= GPS_T - 2 * JIT - 2 &&
                (pps_rise - prev_pps_rise) <= GPS_T + 2 * JIT + 2,
                $sformatf("output second %0d clocks", pps_rise - prev_pps_rise));
      end
      hf_edges = 1;
      seconds_in_run++;
      if (pps_len != period) ev_correct++;
    end

    if (running && !running_q) begin
      ev_acquire++;
      seconds_in_run = 0;
      hf_edges = 0;
      acq_cycle = cycle;
    end
    if (!running && running_q) begin
      ev_expiry++;
      seconds_in_run = 0;
      settled = 0;
    end
    if (holdover && !hold_q) ev_holdover++;
    if (gps_rejected) ev_reject++;
    if (gps_missing) ev_missing++;
    if (dyn_bounds && dut.save) ev_dynamic++;
    settled = running && locked && final_phase;

    pps_q = pps_out; clk_q = clk_out; running_q = running; hold_q = holdover;
  end

  // phase of the internal 1PPS against the GPS pin, once settled
  int phase_checks = 0;
  always @(negedge clk) if (rst_n && settled && pps_out && !pps_q) begin
    // the internal edge follows the pin by the sampler and alignment latency
    // (about 4 clocks) plus the jitter the loop has not followed
    check(cycle - gps_rise >= 4 - 2 * JIT - 2 && cycle - gps_rise <= 5 + 2 * JIT + 2,
          $sformatf("phase: internal edge %0d clocks after the GPS pin", cycle - gps_rise));
    phase_checks++;
  end

  initial begin
    repeat (100 * GPS_T) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint jit();
    return longint'($urandom_range(0, 2 * JIT)) - JIT;
  endfunction

  initial begin
    longint t;
    int     k;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    t = 1234;
    // lock and track
    for (k = 0; k < 12; k++) begin gps_pulse_at(t + jit()); t += GPS_T; end
    check(running && locked, "locked and running after 12 pulses");
    check(period >= GPS_T - 2 * JIT && period <= GPS_T + 2 * JIT, $sformatf("stored period %0d", period));
    // a spurious pulse in the middle of a second
    gps_pulse_at(t - GPS_T / 2);
    for (k = 0; k < 2; k++) begin gps_pulse_at(t + jit()); t += GPS_T; end
    check(running && holdover, "holdover while the receiver is re-validated");
    for (k = 0; k < 4; k++) begin gps_pulse_at(t + jit()); t += GPS_T; end
    check(running && locked && !holdover, "tracking again");
    // outage longer than the holdover limit
    t += (HOLDOVER + 3) * GPS_T;
    while (cycle < t - GPS_T / 2) @(posedge clk);
    check(!running && !pps_out && !clk_out, "outputs stopped after the holdover limit");
    // reacquire, then use the dynamic window
    for (k = 0; k < 4; k++) begin gps_pulse_at(t + jit()); t += GPS_T; end
    check(running, "restarted after reacquisition");
    dyn_bounds = 1'b1;
    for (k = 0; k < 40; k++) begin gps_pulse_at(t + jit()); t += GPS_T; end
    // the loop has settled: check the phase and second length for 12 seconds
    final_phase = 1;
    for (k = 0; k < 12; k++) begin gps_pulse_at(t + jit()); t += GPS_T; end
    check(running && locked, "tracking with the dynamic window");

    $display("events: acquire=%0d reject=%0d missing=%0d holdover=%0d expiry=%0d stretch=%0d correct=%0d hf_limit=%0d dynamic=%0d phase_checks=%0d",
             ev_acquire, ev_reject, ev_missing, ev_holdover, ev_expiry, ev_stretch, ev_correct,
             ev_hf_limit, ev_dynamic, phase_checks);
    check(ev_acquire >= 2, "acquire seen");
    check(ev_reject >= 1, "rejected pulse seen");
    check(ev_missing >= 1, "missing pulse seen");
    check(ev_holdover >= 1, "holdover seen");
    check(ev_expiry >= 1, "holdover expiry seen");
    check(ev_stretch >= 1, "fraction recovery seen");
    check(ev_correct >= 1, "loop correction seen");
    check(ev_hf_limit >= 1, "fast-clock period limit seen");
    check(ev_dynamic >= 1, "dynamic window used");
    check(phase_checks >= 10, "phase checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
