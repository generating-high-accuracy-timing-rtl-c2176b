// tb_pid_sweep: runs the closed control loop for every pair of power-of-two
// weights measured at 50 MHz and at 70 MHz (P = 2^-2..2^-5, I = 2^-4..2^-8)
// against a jittered GPS model, 2000 model seconds each. For every pair it
// checks that the loop is stable (the internal second stays within 16
// clocks of its mean after settling) and does not amplify the jitter
// (output variance below twice the input variance), and for the
// default pair P = 2^-3, I = 2^-5 that it at least halves the variance. It
// prints the variances, the quantity compared in the measurement tables.
module tb_pid_sweep;
  localparam int N = 12;
  localparam int KP [N] = '{2, 3, 4, 4, 4, 5, 3, 3, 3, 4, 4, 5};
  localparam int KI [N] = '{5, 5, 4, 5, 6, 4, 6, 7, 8, 7, 8, 7};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done [N];
  real  var_in [N], var_out [N], max_dev [N];
  int   checks = 0, failures = 0;

  for (genvar g = 0; g < N; g++) begin : g_pair
    pid_loop_model #(.KP_SHIFT(KP[g]), .KI_SHIFT(KI[g])) u_loop (
      .clk, .done(done[g]), .var_in(var_in[g]), .var_out(var_out[g]), .max_dev(max_dev[g]));
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int i = 0; i < N; i++) all_done &= done[i];
    end while (!all_done);
    for (int i = 0; i < N; i++) begin
      $display("P=2^-%0d I=2^-%0d: jitter variance in %0.2f, out %0.2f clocks^2, max deviation %0.1f",
               KP[i], KI[i], var_in[i], var_out[i], max_dev[i]);
      check(max_dev[i] <= 16.0, $sformatf("P=2^-%0d I=2^-%0d unstable", KP[i], KI[i]));
      check(var_out[i] < 2.0 * var_in[i], $sformatf("P=2^-%0d I=2^-%0d amplifies jitter", KP[i], KI[i]));
      if (KP[i] == 3 && KI[i] == 5)
        check(var_out[i] < 0.5 * var_in[i], "default weights halve the jitter variance");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
