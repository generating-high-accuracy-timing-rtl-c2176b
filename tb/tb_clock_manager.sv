// tb_clock_manager: drives pulse strobes at chosen spacings into the grouped
// measurement path and checks the stored period, quotient and remainder
// against integer division, the acquire point after three good pulses,
// that rejected pulses leave the stored values untouched, the missing-pulse
// detection, and the dynamic window following the last stored period.
module tb_clock_manager;
  import gps_timing_pkg::*;
  localparam int NOM = 100, DIV = 10, SH = 4, MG = 3;   // window 94..106

  logic     clk = 1'b0, rst_n = 1'b0;
  logic     pulse = 1'b0, dyn_mode = 1'b0;
  lengths_t measured, lengths;
  logic     lengths_valid, save, acquire, tracking, bad, missing;
  int       checks = 0, failures = 0;
  int       n_acq = 0, n_miss = 0;

  clock_manager #(.NOMINAL(NOM), .DIVISOR(DIV), .DELTA_SHIFT(SH), .MIN_GOOD(MG)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    n_acq  <= n_acq + int'(acquire);
    n_miss <= n_miss + int'(missing);
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // pulse n clocks after the previous one; exp_save: whether it is stored
  task automatic pulse_after(input int n, input bit exp_save, input bit exp_acq);
    lengths_t kept;
    kept = lengths;
    repeat (n - 1) @(negedge clk);
    pulse = 1'b1;
    #1;
    check(save == exp_save, $sformatf("save=%0d for period %0d", save, n));
    check(acquire == exp_acq, $sformatf("acquire=%0d for period %0d", acquire, n));
    @(negedge clk) pulse = 1'b0;
    if (exp_save)
      check(lengths.period == len_t'(n) && lengths.quotient == len_t'(n / DIV) &&
            lengths.remainder == len_t'(n % DIV),
            $sformatf("stored %0d/%0d/%0d for period %0d", lengths.period, lengths.quotient,
                      lengths.remainder, n));
    else
      check(lengths == kept, $sformatf("stored values kept for period %0d", n));
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
    pulse_after(37, 0, 0);    // first pulse: no reference
    pulse_after(100, 0, 0);
    pulse_after(99, 0, 0);
    check(!lengths_valid, "nothing stored kept lock");
    pulse_after(101, 1, 1);   // third good pulse
    check(lengths_valid && tracking, "locked");
    pulse_after(106, 1, 0);
    pulse_after(94, 1, 0);
    pulse_after(93, 0, 0);    // outside static window
    check(!tracking, "tracking lost");
    pulse_after(100, 0, 0);
    pulse_after(100, 0, 0);
    pulse_after(97, 1, 1);
    // missing pulse
    repeat (120) @(negedge clk);
    check(n_miss == 1 && !tracking, "missing pulse detected");
    pulse_after(5, 0, 0);
    // dynamic window: centre follows the stored period (97 -> window 91..103)
    dyn_mode = 1'b1;
    pulse_after(102, 0, 0);
    pulse_after(102, 0, 0);
    pulse_after(102, 1, 1);
    pulse_after(108, 1, 0);   // inside 102 +/- 6
    pulse_after(114, 1, 0);   // inside 108 +/- 6 only in dynamic mode
    dyn_mode = 1'b0;
    pulse_after(114, 0, 0);   // static: outside 94..106
    check(n_acq == 3, $sformatf("acquire count %0d", n_acq));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
