// pid_loop_model: closes the loop around one pid_controller with a model of
// the rest of the board, for the weight sweep. Each model second the GPS
// edge arrives at k*T plus jitter (sum of three uniform values in
// [-2, 2] clocks, variance 6 clocks^2), the internal edge advances by the
// controller's current length, and their difference is fed back as the
// phase error. After SETTLE seconds it accumulates the variance of the GPS
// jitter and of the internal edge against the ideal second, and the largest
// deviation of the internal edge from its mean.
module pid_loop_model #(
  parameter int unsigned KP_SHIFT = 3,
  parameter int unsigned KI_SHIFT = 5,
  parameter longint      T        = 50_000_150,
  parameter int          SECONDS  = 2000,
  parameter int          SETTLE   = 500
) (
  input  logic clk,
  output logic done,
  output real  var_in,
  output real  var_out,
  output real  max_dev
);
  import gps_timing_pkg::*;

  logic   rst_n = 1'b0, init = 1'b0, e_valid = 1'b0;
  len_t   base_in = '0;
  delay_t e = '0;
  len_t   len_out;
  logic [CNT_W+7:0]   len_fix;
  logic signed [47:0] integ;

  pid_controller #(.KP_SHIFT(KP_SHIFT), .KI_SHIFT(KI_SHIFT), .FRAC(8)) u_pid (
    .clk, .rst_n, .init, .base_in, .e_valid, .e, .len_out, .len_fix, .integ);

  initial begin
    longint int_pos, gps, j;
    real    s_in, s2_in, s_out, s2_out, n, mean_out;
    real    outs[$];
    done = 1'b0;
    s_in = 0; s2_in = 0; s_out = 0; s2_out = 0; n = 0;
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk) begin init = 1'b1; base_in = len_t'(T + 3); end
    @(negedge clk) init = 1'b0;
    int_pos = 0;
    for (int k = 1; k <= SECONDS; k++) begin
      j = 0;
      repeat (3) j += longint'($urandom_range(0, 4)) - 2;
      gps = longint'(k) * T + j;
      int_pos += longint'(len_out);
      @(negedge clk) begin e_valid = 1'b1; e = delay_t'(gps - int_pos); end
      @(negedge clk) e_valid = 1'b0;
      if (k > SETTLE) begin
        real d;
        d = real'(int_pos - longint'(k) * T);
        s_in += real'(j); s2_in += real'(j) * real'(j);
        s_out += d; s2_out += d * d; n += 1.0;
        outs.push_back(d);
      end
    end
    var_in  = s2_in / n - (s_in / n) * (s_in / n);
    mean_out = s_out / n;
    var_out = s2_out / n - mean_out * mean_out;
    max_dev = 0;
    foreach (outs[i]) if ((outs[i] - mean_out > 0 ? outs[i] - mean_out : mean_out - outs[i]) > max_dev)
      max_dev = (outs[i] - mean_out > 0 ? outs[i] - mean_out : mean_out - outs[i]);
    done = 1'b1;
  end
endmodule
