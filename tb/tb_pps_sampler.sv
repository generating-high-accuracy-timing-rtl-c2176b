// tb_pps_sampler: checks that a noisy, bouncing GPS pulse yields exactly one
// one-cycle strobe, three clocks after the pin is first sampled high, and
// that bounces on both edges are ignored during the hold-off time.
module tb_pps_sampler;
  localparam int HOLDOFF = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic pps_in = 1'b0;
  logic pps_pulse, pps_level;
  int   checks = 0, failures = 0;
  int   cycle = 0;
  int   strobes = 0;
  int   last_strobe = -1;
  int   rise_cycle;

  pps_sampler #(.HOLDOFF(HOLDOFF)) dut (.clk, .rst_n, .pps_in, .pps_pulse, .pps_level);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (pps_pulse) begin
      strobes     <= strobes + 1;
      last_strobe <= cycle;
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", msg, cycle);
    end
  endtask

  // One GPS pulse: a bouncing rising edge, a long high, a bouncing fall.
  task automatic gps_pulse(input int high_cycles, input int bounces);
    @(negedge clk);
    pps_in = 1'b1;
    rise_cycle = cycle;
    for (int b = 0; b < bounces; b++) begin
      @(negedge clk) pps_in = 1'b0;
      @(negedge clk) pps_in = 1'b1;
    end
    repeat (high_cycles) @(negedge clk);
    for (int b = 0; b < bounces; b++) begin
      pps_in = 1'b0;
      @(negedge clk) pps_in = 1'b1;
      @(negedge clk);
    end
    pps_in = 1'b0;
    repeat (3 * HOLDOFF) @(negedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // a pin that is high during reset is not a new pulse
    pps_in = 1'b1;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    check(strobes == 0, "no strobe for a pulse already high at reset");
    pps_in = 1'b0;
    repeat (3 * HOLDOFF) @(negedge clk);

    for (int p = 0; p < 6; p++) begin
      int n_before;
      n_before = strobes;
      gps_pulse(20 + 7 * p, p % 3 + 1);
      check(strobes == n_before + 1, $sformatf("exactly one strobe for pulse %0d", p));
      // pin set high n_before posedge rise_cycle; sampled there, 2 sync stages, state
      check(last_strobe == rise_cycle + 3, $sformatf("strobe latency pulse %0d: %0d", p, last_strobe - rise_cycle));
    end

    // strobe is a single cycle wide
    begin
      int width = 0;
      fork
        gps_pulse(30, 0);
        repeat (40) begin
          @(posedge clk);
          #1 if (pps_pulse) width++;
        end
      join
      check(width == 1, $sformatf("strobe width %0d", width));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
