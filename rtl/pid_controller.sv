// pid_controller: disciplines the length of the internally built 1PPS so
// that its rising edge follows the GPS pulse.
//
// For each signed phase error e[n] (delay from the internal to the GPS rising
// edge, in master clocks) the length of the next internal seconds is set to
//   len = base + e[n]/2**KP_SHIFT + (sum of all e)/2**KI_SHIFT
//             + KD_EN * (e[n] - e[n-1])/2**KD_SHIFT
// where base is the period measured when the loop was (re)started. All
// weights are powers of two, so the multiplications are shifts. The sum is
// kept in fixed point with FRAC fraction bits and rounded to a whole number
// of clocks, ties to even, before it reaches the 1PPS builder. A late GPS
// pulse (e > 0) lengthens the internal second, an early one shortens it: the
// proportional term pulls the phase in, the integral term absorbs the
// frequency offset and drift of the crystal. The defaults P = 1/8, I = 1/32,
// D = 0 are the weights chosen for the 50 MHz design.
//
// Interface: init (one cycle) loads base_in and clears the integrator;
// e_valid (one cycle) applies e. len_out is the rounded length, len_fix the
// unrounded one (FRAC fraction bits), integ the error sum.
// Timing: len_out changes one clock after init or e_valid.
// The control law, the power-of-two weights and the rounding follow the
// design description; the fixed base, the clamp of the length to at least
// one clock and FRAC = 8 (enough for weights down to 2**-8) are this
// design's choices.
module pid_controller
  import gps_timing_pkg::*;
#(
  parameter int unsigned KP_SHIFT = 3,
  parameter int unsigned KI_SHIFT = 5,
  parameter int unsigned KD_SHIFT = 0,
  parameter bit          KD_EN    = 1'b0,
  parameter int unsigned FRAC     = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  init,
  input  len_t                  base_in,
  input  logic                  e_valid,
  input  delay_t                e,
  output len_t                  len_out,
  output logic [CNT_W+FRAC-1:0] len_fix,
  output logic signed [47:0]    integ
);

  localparam int AW = 48 + FRAC + 2;   // wide signed working width
  typedef logic signed [AW-1:0] acc_t;

  len_t          base_q;
  delay_t        e_prev_q;
  logic signed [47:0] integ_n;
  acc_t          p_term, i_term, d_term, sum;
  logic [CNT_W+FRAC-1:0] len_fix_q;

  assign integ_n = integ + 48'(e);
  assign p_term  = (acc_t'(e) <<< FRAC) >>> KP_SHIFT;
  assign i_term  = (acc_t'(integ_n) <<< FRAC) >>> KI_SHIFT;
  assign d_term  = KD_EN ? ((acc_t'(e) - acc_t'(e_prev_q)) <<< FRAC) >>> KD_SHIFT : '0;
  assign sum     = (acc_t'({1'b0, base_q}) <<< FRAC) + p_term + i_term + d_term;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      base_q    <= '0;
      e_prev_q  <= '0;
      integ     <= '0;
      len_fix_q <= '0;
    end else if (init) begin
      base_q    <= base_in;
      e_prev_q  <= '0;
      integ     <= '0;
      len_fix_q <= {base_in, {FRAC{1'b0}}};
    end else if (e_valid) begin
      e_prev_q <= e;
      integ    <= integ_n;
      if (sum < (acc_t'(1) <<< FRAC))
        len_fix_q <= {len_t'(1), {FRAC{1'b0}}};
      else
        len_fix_q <= sum[CNT_W+FRAC-1:0];
    end
  end

  assign len_fix = len_fix_q;

  round_half_even #(.IW(CNT_W), .FRAC(FRAC)) u_round (
    .x(len_fix_q),
    .y(len_out)
  );

endmodule
