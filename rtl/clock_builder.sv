// clock_builder: generates a periodic output whose period is given in
// master-clock cycles, with recovery of the fractional part of the period.
//
// A cycle counter runs from 0 to cur_len-1 and wraps. At the start of every
// period the remainder of the integer division (rem) is added to an
// accumulator modulo DIVISOR; when the accumulator overflows, that period is
// made one master clock longer. Over DIVISOR output cycles the lost fractions
// add up to exactly rem whole clocks, so that, for example, a 999-clock
// reference divided by 100 gives 9-clock periods with 99 of them stretched
// to 10, and exactly 100 periods fill the reference (rem < DIVISOR). The output is either a pulse of
// pulse_width clocks at the start of each period (pulse_mode = 1) or a square
// wave high for the first half of each period, rounded up (pulse_mode = 0).
// After max_cycles periods since the last restart or rearm the builder stops
// and holds its output low (max_cycles = 0 means no limit). This stops a
// 1PPS output when the satellite signal is lost, and keeps a fast clock from
// building a spurious extra period before the next 1PPS restarts it.
//
// Interface: en allows building (dropping it stops the builder); restart
// (one cycle) starts a new sequence with the counter at 0 on the next clock;
// rearm (one cycle) clears the period budget without touching the phase. len
// and rem are sampled at restart and at every wrap. Outputs: out, start
// (high in the first cycle of every period, when out rises), wrap (high in
// the last cycle of every period), active (builder running).
// Timing: restart in cycle t gives start and a rising out in cycle t+1.
// The inputs and the fraction recovery follow the design description; the
// duty-cycle rule and which period receives the extra clock are this
// design's choices. out, start and wrap are decoded from registers without
// an output register.
module clock_builder
  import gps_timing_pkg::*;
#(
  parameter int unsigned DIVISOR = F_OUT_DEFAULT / F_REF_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic restart,
  input  logic rearm,
  input  len_t len,
  input  len_t rem,
  input  logic pulse_mode,
  input  len_t pulse_width,
  input  len_t max_cycles,
  output logic out,
  output logic start,
  output logic wrap,
  output logic active
);

  logic running_q;
  len_t cnt_q, cur_len_q, acc_q, ncyc_q;
  len_t len_min1, acc_sum, ncyc_inc;
  logic acc_ovf;

  assign len_min1 = (len == '0) ? len_t'(1) : len;
  assign acc_sum  = acc_q + rem;
  assign acc_ovf  = (acc_sum >= len_t'(DIVISOR));
  assign ncyc_inc = ncyc_q + 1'b1;

  assign wrap   = running_q && (cnt_q >= cur_len_q - 1'b1);
  assign start  = running_q && (cnt_q == '0);
  assign active = running_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running_q <= 1'b0;
      cnt_q     <= '0;
      cur_len_q <= len_t'(1);
      acc_q     <= '0;
      ncyc_q    <= '0;
    end else if (!en) begin
      running_q <= 1'b0;
    end else if (restart) begin
      running_q <= 1'b1;
      cnt_q     <= '0;
      cur_len_q <= len_min1;
      acc_q     <= rem;
      ncyc_q    <= '0;
    end else if (running_q) begin
      if (wrap) begin
        cnt_q <= '0;
        if (acc_ovf) begin
          acc_q     <= acc_sum - len_t'(DIVISOR);
          cur_len_q <= len_min1 + 1'b1;
        end else begin
          acc_q     <= acc_sum;
          cur_len_q <= len_min1;
        end
        if (rearm) begin
          ncyc_q <= '0;
        end else begin
          ncyc_q <= ncyc_inc;
          if (max_cycles != '0 && ncyc_inc >= max_cycles) running_q <= 1'b0;
        end
      end else begin
        cnt_q <= cnt_q + 1'b1;
        if (rearm) ncyc_q <= '0;
      end
    end
  end

  // The counter never passes the period it is building.
  always_ff @(posedge clk)
    if (rst_n) a_cnt_in_period: assert (!running_q || cnt_q < cur_len_q);

  always_comb begin
    if (!running_q)      out = 1'b0;
    else if (pulse_mode) out = (cnt_q < pulse_width);
    else                 out = (cnt_q < ((cur_len_q + 1'b1) >> 1));
  end

endmodule
