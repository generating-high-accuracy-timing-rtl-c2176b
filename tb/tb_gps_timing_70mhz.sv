// tb_gps_timing_70mhz: the timing generator in its 70 MHz configuration
// (F_CLK = 70 MHz, 10 MHz output, loop weights P = 2^-4, I = 2^-5, the pair
// with the lowest output variance among the 70 MHz measurements) through
// acquisition and two full output seconds. The GPS second lasts 70,000,210
// master clocks (3 ppm) with +/-2 clocks of jitter. Checks that each output
// second holds exactly 10,000,000 fast cycles of 7 or 8 clocks, the 100 us
// (7,000-clock) 1PPS pulse, and the output second length. About 420 million
// clock cycles are simulated.
module tb_gps_timing_70mhz;
  import gps_timing_pkg::*;

  localparam longint GPS_T = 70_000_210;
  localparam int     JIT   = 2;
  localparam int     N_PULSES = 6;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   gps_pps = 1'b0, dyn_bounds = 1'b0;
  logic   pps_out, clk_out, locked, running, holdover;
  len_t   period, pps_len;
  delay_t phase_err;
  logic   gps_rejected, gps_missing;

  gps_timing_top #(.F_CLK(70_000_000), .KP_SHIFT(4), .KI_SHIFT(5)) dut (.*);

  int     checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (cycle %0d)", msg, cycle); end
  endtask

  // cheap per-cycle monitor: edge counts and widths
  logic   pps_q = 1'b0, clk_q = 1'b0;
  longint hf_edges = 0, pps_rise = -1, prev_rise = -1;
  int     pps_high = 0, hf_len = 0, bad_hf_len = 0, seconds = 0, widths_ok = 0;
  longint hf_per_second[$];
  longint second_len[$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    pps_q <= pps_out;
    clk_q <= clk_out;
    if (clk_out && !clk_q) begin
      hf_edges <= hf_edges + 1;
      hf_len   <= 1;
      if (hf_edges > 0 && seconds > 0 && hf_len != 7 && hf_len != 8 && !(pps_out && !pps_q))
        bad_hf_len <= bad_hf_len + 1;
    end else hf_len <= hf_len + 1;
    if (pps_out) pps_high <= pps_high + 1;
    if (!pps_out && pps_q) begin
      if (pps_high == 7000) widths_ok <= widths_ok + 1;
      pps_high <= 0;
    end
    if (pps_out && !pps_q) begin
      if (seconds > 0) begin
        hf_per_second.push_back(hf_edges);
        second_len.push_back(cycle - pps_rise);
      end
      hf_edges  <= 1;
      pps_rise  <= cycle;
      seconds   <= seconds + 1;
    end
  end

  initial begin
    #(10 * (N_PULSES + 2) * GPS_T);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint gps_rise[$];

  initial begin
    longint t;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    t = 1000;
    for (int k = 0; k < N_PULSES; k++) begin
      longint c;
      c = t + longint'($urandom_range(0, 2 * JIT)) - JIT;
      // wait with one long delay rather than cycle by cycle
      #((c - cycle) * 10 - 3);
      gps_pps = 1'b1;
      gps_rise.push_back(c);
      #(7000 * 10);
      gps_pps = 1'b0;
      t += GPS_T;
      if (k == 2) check(!running, "no output before three good periods");
      if (k == 3) begin
        #(20);
        check(running && locked, "running and locked after the acquiring pulse");
      end
    end
    #(GPS_T * 10 / 2);
    check(seconds == 3, $sformatf("%0d output 1PPS edges", seconds));
    foreach (hf_per_second[i])
      check(hf_per_second[i] == 10_000_000, $sformatf("second %0d: %0d fast cycles", i, hf_per_second[i]));
    foreach (second_len[i])
      check(second_len[i] >= GPS_T - 2 * JIT - 2 && second_len[i] <= GPS_T + 2 * JIT + 2,
            $sformatf("second %0d: %0d clocks", i, second_len[i]));
    check(hf_per_second.size() == 2, "two full seconds measured");
    check(bad_hf_len == 0, $sformatf("%0d fast periods not 7 or 8 clocks", bad_hf_len));
    check(widths_ok >= 2, $sformatf("%0d 1PPS pulses of 100 us", widths_ok));
    check(period >= GPS_T - 2 * JIT && period <= GPS_T + 2 * JIT, $sformatf("stored period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
