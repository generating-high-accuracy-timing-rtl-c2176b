// tb_delay_meter: checks positive, negative and zero delays between the two
// edge strobes, the one-clock result latency, and the timeout.
module tb_delay_meter;
  import gps_timing_pkg::*;
  localparam int MAXD = 200;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   int_edge = 1'b0, gps_edge = 1'b0;
  delay_t delay;
  logic   valid, timeout;
  int     checks = 0, failures = 0;
  int     n_valid = 0, n_timeout = 0;

  delay_meter #(.MAX_DELAY(MAXD)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    n_valid   <= n_valid + int'(valid);
    n_timeout <= n_timeout + int'(timeout);
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // GPS edge d cycles after the internal edge (d may be negative or 0)
  task automatic measure(input int d);
    int nv;
    nv = n_valid;
    @(negedge clk);
    if (d == 0) begin
      int_edge = 1'b1; gps_edge = 1'b1;
      @(negedge clk) begin int_edge = 1'b0; gps_edge = 1'b0; end
    end else begin
      if (d > 0) int_edge = 1'b1; else gps_edge = 1'b1;
      @(negedge clk) begin int_edge = 1'b0; gps_edge = 1'b0; end
      repeat ((d > 0 ? d : -d) - 1) @(negedge clk);
      if (d > 0) gps_edge = 1'b1; else int_edge = 1'b1;
      @(negedge clk) begin int_edge = 1'b0; gps_edge = 1'b0; end
    end
    // result strobe is visible now (one clock after the closing edge)
    check(valid && delay == delay_t'(d), $sformatf("delay %0d exp %0d valid %0d", delay, d, valid));
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    measure(0); measure(1); measure(-1); measure(5); measure(-17);
    for (int k = 0; k < 40; k++) measure($urandom_range(0, 2 * MAXD - 2) - (MAXD - 1));
    // timeout: internal edge and no GPS edge
    begin
      int nt;
      nt = n_timeout;
      @(negedge clk) int_edge = 1'b1;
      @(negedge clk) int_edge = 1'b0;
      repeat (MAXD + 5) @(negedge clk);
      check(n_timeout == nt + 1, "timeout counted");
      gps_edge = 1'b1;
      @(negedge clk) gps_edge = 1'b0;
      @(negedge clk);
      check(!valid, "no result from a late GPS edge");
      repeat (MAXD + 5) @(negedge clk);
    end
    measure(-3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
