// tb_clock_builder: checks the period sequence of the builder against the
// fraction-recovery rule computed in the testbench (period k is
// len + floor(k*rem/DIV) - floor((k-1)*rem/DIV)), the total length of a run
// of DIV periods, the duty cycle in both modes, the period limit with and
// without rearm, the enable, and the one-clock restart latency.
module tb_clock_builder;
  import gps_timing_pkg::*;
  localparam int DIV = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b1, restart = 1'b0, rearm = 1'b0, pulse_mode = 1'b0;
  len_t len = 9, rem = 99, pulse_width = 4, max_cycles = DIV;
  logic out, start, wrap, active;
  int   checks = 0, failures = 0;
  int   cycle = 0;

  clock_builder #(.DIVISOR(DIV)) dut (.*);

  // second instance for the 10-clock / 3-period example
  logic out3, start3, wrap3, active3, restart3 = 1'b0;
  clock_builder #(.DIVISOR(3)) dut3 (
    .clk, .rst_n, .en(1'b1), .restart(restart3), .rearm(1'b0),
    .len(len_t'(3)), .rem(len_t'(1)), .pulse_mode(1'b0), .pulse_width('0),
    .max_cycles(len_t'(3)), .out(out3), .start(start3), .wrap(wrap3), .active(active3));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (cycle %0d)", msg, cycle); end
  endtask

  // Follow one run from restart: measure every period and its high time.
  task automatic run_and_check(input int n_periods, input int l, input int r, input bit pm,
                               input int pw, input string tag);
    int k, plen, phigh, total;
    @(negedge clk) restart = 1'b1;
    @(negedge clk) restart = 1'b0;
    check(start && out, {tag, ": start and out one clock after restart"});
    total = 0;
    for (k = 1; k <= n_periods; k++) begin
      int exp_len, exp_high;
      exp_len = l + (k * r) / DIV - ((k - 1) * r) / DIV;
      exp_high = pm ? pw : (exp_len + 1) / 2;
      plen = 0; phigh = 0;
      do begin
        plen++;
        phigh += int'(out);
        @(negedge clk);
      end while (!start && active && plen < 10000);
      total += plen;
      check(plen == exp_len, $sformatf("%s: period %0d length %0d exp %0d", tag, k, plen, exp_len));
      check(phigh == exp_high, $sformatf("%s: period %0d high %0d exp %0d", tag, k, phigh, exp_high));
    end
    if (max_cycles == len_t'(n_periods)) begin
      check(!active && !out, {tag, ": stopped after max_cycles"});
      check(total == l * n_periods + r * n_periods / DIV, $sformatf("%s: total %0d", tag, total));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, n3, high3;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1 check(!out && !active, "idle after reset");

    // 999 clocks / 100 periods with remainder recovery
    run_and_check(DIV, 9, 99, 1'b0, 0, "999/100");
    // 1000 / 100 without remainder
    len = 10; rem = 0;
    run_and_check(DIV, 10, 0, 1'b0, 0, "1000/100");
    // random lengths
    for (int j = 0; j < 5; j++) begin
      len = $urandom_range(2, 12); rem = $urandom_range(0, DIV - 1);
      run_and_check(DIV, int'(len), int'(rem), 1'b0, 0, "random");
    end

    // 10 clocks, 3 periods: 3 + 3 + 4
    @(negedge clk) restart3 = 1'b1;
    @(negedge clk) restart3 = 1'b0;
    n3 = 0; high3 = 0;
    while (active3 && n3 < 100) begin n3++; high3 += int'(out3); @(negedge clk); end
    check(n3 == 10, $sformatf("3 periods in %0d clocks", n3));
    check(high3 == 2 + 2 + 2, $sformatf("3-period high time %0d", high3));

    // pulse mode, unlimited
    pulse_mode = 1'b1; len = 20; rem = 0; max_cycles = 0; pulse_width = 4;
    run_and_check(12, 20, 0, 1'b1, 4, "pulse");
    check(active, "unlimited run still active");

    // period budget with rearm
    max_cycles = 5;
    @(negedge clk) restart = 1'b1;
    @(negedge clk) restart = 1'b0;
    t0 = cycle;
    for (int k = 0; k < 4; k++) begin
      repeat (60) @(negedge clk);
      rearm = 1'b1;
      @(negedge clk) rearm = 1'b0;
    end
    check(active, "rearm keeps the builder running past max_cycles");
    repeat (5 * 20 + 5) @(negedge clk);
    check(!active && !out, "stops max_cycles periods after the last rearm");

    // enable
    max_cycles = 0;
    @(negedge clk) restart = 1'b1;
    @(negedge clk) restart = 1'b0;
    repeat (30) @(negedge clk);
    en = 1'b0;
    @(negedge clk);
    check(!active && !out, "enable low stops the builder");
    restart = 1'b1;
    @(negedge clk) restart = 1'b0;
    check(!active, "restart ignored while disabled");
    en = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
