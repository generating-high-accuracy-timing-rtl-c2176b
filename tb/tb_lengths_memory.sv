// tb_lengths_memory: checks that the stored record changes only on save,
// one clock later, and that valid rises with the first save.
module tb_lengths_memory;
  import gps_timing_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, save = 1'b0;
  lengths_t din = '0, dout, expected;
  logic valid;
  int checks = 0, failures = 0;

  lengths_memory dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
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
    #1 check(!valid && dout == '0, "empty after reset");
    expected = '0;
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      din  = '{period: $urandom, quotient: $urandom, remainder: $urandom};
      save = ($urandom_range(0, 2) == 0);
      @(negedge clk);
      if (save) expected = din;
      save = 1'b0;
      check(dout == expected, $sformatf("record %0d", k));
      check(valid == (expected != '0), "valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
