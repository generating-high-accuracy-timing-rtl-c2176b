// tb_synchronizer: drives a divider-like counter and pulse strobes and checks
// window acceptance, rejection of early and late pulses, the counter freeze
// on a missing pulse, and the MIN_GOOD consecutive-pulse rule for save and
// acquire, against a reference model written in the testbench.
module tb_synchronizer;
  import gps_timing_pkg::*;
  localparam int MIN_GOOD = 3;
  localparam int LO = 95, HI = 105;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pulse = 1'b0;
  len_t dividend;
  len_t lo = LO, hi = HI;
  logic count_en, save, acquire, tracking, bad, missing;
  int   checks = 0, failures = 0;
  int   n_save = 0, n_acq = 0, n_bad = 0, n_miss = 0;

  synchronizer #(.MIN_GOOD(MIN_GOOD)) dut (.*);

  // the divider's dividend counter, frozen by count_en
  len_t cnt_q;
  always_ff @(posedge clk) begin
    if (!rst_n)        cnt_q <= '0;
    else if (pulse)    cnt_q <= 1;
    else if (count_en) cnt_q <= cnt_q + 1;
  end
  assign dividend = cnt_q;

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    n_save += int'(save); n_acq += int'(acquire); n_bad += int'(bad); n_miss += int'(missing);
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference model state
  bit have_ref = 0;
  int good = 0;

  // issue a pulse n cycles after the previous one and check the outputs in
  // the strobe cycle
  task automatic pulse_after(input int n);
    bit exp_valid;
    repeat (n - 1) @(negedge clk);
    pulse = 1'b1;
    #1;
    exp_valid = have_ref && (n >= LO) && (n <= HI);
    check(bad == !exp_valid, $sformatf("bad=%0d for period %0d", bad, n));
    check(save == (exp_valid && good + 1 >= MIN_GOOD), $sformatf("save=%0d period %0d good %0d", save, n, good));
    check(acquire == (exp_valid && good + 1 == MIN_GOOD), $sformatf("acquire=%0d period %0d", acquire, n));
    if (exp_valid) good = (good < MIN_GOOD) ? good + 1 : MIN_GOOD;
    else           good = 0;
    have_ref = 1;
    @(negedge clk) pulse = 1'b0;
    check(tracking == (good == MIN_GOOD), "tracking level");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(count_en == 1'b0, "counters frozen before the first pulse");
    pulse_after(7);            // first pulse: no reference, invalid
    pulse_after(100);
    pulse_after(98);
    pulse_after(103);          // third good: acquire
    pulse_after(101);
    pulse_after(80);           // early: bad
    pulse_after(100);
    pulse_after(100);
    pulse_after(95);           // reacquire
    pulse_after(105);
    // missing pulse: counter passes HI, freezes
    repeat (HI + 5) @(negedge clk);
    check(count_en == 1'b0, "count_en low after missing pulse");
    check(dividend == HI + 2, $sformatf("dividend frozen at %0d", dividend));
    check(!tracking, "tracking lost after missing pulse");
    good = 0; have_ref = 0;
    pulse_after(1);            // after a missing pulse the next one is invalid
    for (int k = 0; k < 30; k++) pulse_after(90 + $urandom_range(0, 20));
    check(n_acq >= 2 && n_bad >= 2 && n_miss >= 1 && n_save >= 4, "all events seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
