// tb_bounds_memory: checks the static window around the nominal period, the
// dynamic window around the last saved period, and the return to the
// nominal centre after reset.
module tb_bounds_memory;
  import gps_timing_pkg::*;
  localparam int unsigned NOM = 50_000_000;
  localparam int unsigned N   = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic dyn_mode = 1'b0, update = 1'b0;
  len_t period_in = '0, lo, hi;
  int   checks = 0, failures = 0;

  bounds_memory #(.NOMINAL(NOM), .DELTA_SHIFT(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic expect_window(input longint c, input string msg);
    longint d;
    d = c / (longint'(1) << N);
    #1;
    check(lo == len_t'(c - d) && hi == len_t'(c + d),
          $sformatf("%s: lo %0d hi %0d, centre %0d delta %0d", msg, lo, hi, c, d));
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    expect_window(NOM, "static after reset");
    dyn_mode = 1'b1;
    expect_window(NOM, "dynamic default after reset");
    for (int k = 0; k < 20; k++) begin
      longint p;
      p = NOM - 20000 + $urandom_range(0, 40000);
      @(negedge clk) begin update = 1'b1; period_in = len_t'(p); end
      @(negedge clk) update = 1'b0;
      expect_window(p, "dynamic after update");
      dyn_mode = 1'b0;
      expect_window(NOM, "static ignores updates");
      dyn_mode = 1'b1;
    end
    // update without strobe has no effect
    period_in = 12345;
    @(negedge clk);
    check(hi != 12345 + (12345 >> N), "no update without strobe");
    rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    expect_window(NOM, "dynamic centre back to nominal after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
