// tb_divider: checks period, quotient and remainder counters against an
// independent integer division for many pulse spacings (the 10 Hz clock /
// divisor 3 example and the 100-clock / divisor 10 table among them), and
// checks that count_en low freezes them.
module tb_divider;
  import gps_timing_pkg::*;
  localparam int DIV = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pulse = 1'b0, count_en = 1'b1;
  len_t dividend, quotient, remainder;
  int   checks = 0, failures = 0;

  divider #(.DIVISOR(DIV)) dut (.*);

  logic clk3 = 1'b0;
  logic pulse3 = 1'b0;
  len_t d3, q3, r3;
  divider #(.DIVISOR(3)) dut3 (.clk, .rst_n, .pulse(pulse3), .count_en(1'b1),
                               .dividend(d3), .quotient(q3), .remainder(r3));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // pulse, then wait n cycles and check the values seen with the next pulse
  task automatic period(input int n);
    @(negedge clk) pulse = 1'b1;
    @(negedge clk) pulse = 1'b0;
    repeat (n - 1) @(negedge clk);
    // now in the cycle of the next strobe
    check(dividend == len_t'(n), $sformatf("dividend %0d exp %0d", dividend, n));
    check(quotient == len_t'(n / DIV), $sformatf("quotient %0d exp %0d", quotient, n / DIV));
    check(remainder == len_t'(n % DIV), $sformatf("remainder %0d exp %0d", remainder, n % DIV));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // example: 10 clocks of a 10 Hz clock per 1 Hz pulse, divisor 3
    @(negedge clk) pulse3 = 1'b1;
    @(negedge clk) pulse3 = 1'b0;
    repeat (9) @(negedge clk);
    check(d3 == 10 && q3 == 3 && r3 == 1, $sformatf("10/3 gave %0d %0d %0d", d3, q3, r3));
    pulse3 = 1'b1;
    @(negedge clk) pulse3 = 1'b0;

    period(76);  period(83);  period(90);  period(100); period(111);
    period(125); period(142); period(166); period(200); period(250);
    period(333); period(500); period(1000); period(1); period(9); period(10);
    for (int k = 0; k < 20; k++) period(1 + $urandom_range(0, 700));

    // freeze
    @(negedge clk) pulse = 1'b1;
    @(negedge clk) pulse = 1'b0;
    repeat (24) @(negedge clk);
    count_en = 1'b0;
    repeat (30) @(negedge clk);
    check(dividend == 25 && quotient == 2 && remainder == 5,
          $sformatf("freeze held %0d %0d %0d", dividend, quotient, remainder));
    count_en = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
