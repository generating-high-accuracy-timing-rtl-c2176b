// tb_pid_controller: open loop, compares the length after every error sample
// with base + e/8 + (sum of e)/32 rounded half to even, computed in the
// testbench. Closed loop, models a GPS second of T clocks and an internal
// second started 1 us (50 clocks at 50 MHz) too long and checks that the
// phase error returns to within one clock and the length to T, the step
// response used to choose the weights.
module tb_pid_controller;
  import gps_timing_pkg::*;
  localparam int FRAC = 8;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   init = 1'b0, e_valid = 1'b0;
  len_t   base_in = '0;
  delay_t e = '0;
  len_t   len_out;
  logic [CNT_W+FRAC-1:0] len_fix;
  logic signed [47:0]    integ;
  int     checks = 0, failures = 0;

  pid_controller #(.KP_SHIFT(3), .KI_SHIFT(5), .KD_SHIFT(0), .KD_EN(1'b0), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic longint round_even(input real v);
    longint f;
    real    fr;
    f  = longint'($floor(v));
    fr = v - real'(f);
    if (fr > 0.5)      return f + 1;
    else if (fr < 0.5) return f;
    else               return (f % 2 != 0) ? f + 1 : f;
  endfunction

  task automatic do_init(input longint b);
    @(negedge clk) begin init = 1'b1; base_in = len_t'(b); end
    @(negedge clk) init = 1'b0;
  endtask

  task automatic apply(input longint err);
    @(negedge clk) begin e_valid = 1'b1; e = delay_t'(err); end
    @(negedge clk) e_valid = 1'b0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint base, s, err, T, L, ph, max_abs;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // open loop
    base = 50_000_000;
    do_init(base);
    check(len_out == len_t'(base), "length after init is the base");
    s = 0;
    for (int k = 0; k < 300; k++) begin
      real v;
      err = longint'($urandom_range(0, 200)) - 100;
      s += err;
      apply(err);
      v = real'(base) + real'(err) / 8.0 + real'(s) / 32.0;
      check(longint'(len_out) == round_even(v),
            $sformatf("open loop k=%0d e=%0d sum=%0d len=%0d exp=%0d", k, err, s, len_out, round_even(v)));
      check(integ == 48'(s), "integrator holds the error sum");
    end

    // closed loop step response: internal second starts 50 clocks long
    T = 50_000_000;
    do_init(T + 50);
    ph = 0;        // delay from the internal edge to the GPS edge
    L = T + 50;
    max_abs = 0;
    for (int n = 0; n < 400; n++) begin
      ph = ph + T - L;          // the internal second lasted L, the GPS one T
      apply(ph);
      L = longint'(len_out);
      if (n >= 300) begin
        if ((ph < 0 ? -ph : ph) > max_abs) max_abs = (ph < 0 ? -ph : ph);
      end
    end
    check(max_abs <= 1, $sformatf("phase error settles within 1 clock (max %0d)", max_abs));
    check(L >= T - 1 && L <= T + 1, $sformatf("length settles at the GPS period (%0d)", L));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
