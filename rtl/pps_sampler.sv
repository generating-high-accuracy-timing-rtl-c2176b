// pps_sampler: turns the raw GPS 1PPS pin into one master-clock "reset"
// strobe per second.
//
// The GPS pulse is asynchronous to the master clock, is about 100 us long and
// has a slow, noisy rising edge. The pin is first passed through a two-stage
// synchronizer; a Moore state machine then emits a strobe of exactly one
// master-clock cycle on the first sampled high level and afterwards stops
// looking at the input for HOLDOFF cycles, so that threshold re-crossings
// during the slow edge cannot produce a second strobe. The same suspension
// is applied after the falling edge (a hysteresis cycle). Being a Moore
// machine, the strobe depends on the state alone and is seen by every
// consumer on the same clock edge.
//
// Interface: clk, rst_n (active-low, synchronous), pps_in (asynchronous pin),
// pps_pulse (one-cycle strobe), pps_level (the filtered input level).
// Timing: pps_pulse is high 3 clock cycles after the first edge at which the
// pin is sampled high (two synchronizer stages plus the state register).
// Synchronous sampling, the one-cycle strobe and the suspension after edges
// follow the design description; the two-flop synchronizer, the suspension
// after the falling edge and the HOLDOFF default (64 cycles, 1.28 us at
// 50 MHz, longer than an 800 ns rise time) are choices of this design.
module pps_sampler #(
  parameter int unsigned HOLDOFF = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pps_in,
  output logic pps_pulse,
  output logic pps_level
);

  typedef enum logic [2:0] {
    S_LOW,     // waiting for the input to go high
    S_EDGE,    // rising edge seen: strobe
    S_HOLD_H,  // sampling suspended after the rising edge
    S_HIGH,    // waiting for the input to go low
    S_HOLD_L   // sampling suspended after the falling edge
  } state_t;

  localparam int HW = (HOLDOFF > 1) ? $clog2(HOLDOFF + 1) : 1;

  logic [1:0]  sync_q;
  state_t      state_q;
  logic [HW-1:0] hold_q;

  always_ff @(posedge clk) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[0], pps_in};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_HIGH;      // a pulse in progress at reset is not a new edge
      hold_q  <= '0;
    end else begin
      unique case (state_q)
        S_LOW:    if (sync_q[1]) state_q <= S_EDGE;
        S_EDGE: begin
          state_q <= S_HOLD_H;
          hold_q  <= '0;
        end
        S_HOLD_H: begin
          if (hold_q >= HW'(HOLDOFF - 1)) state_q <= S_HIGH;
          else                            hold_q  <= hold_q + 1'b1;
        end
        S_HIGH: if (!sync_q[1]) begin
          state_q <= S_HOLD_L;
          hold_q  <= '0;
        end
        S_HOLD_L: begin
          if (hold_q >= HW'(HOLDOFF - 1)) state_q <= S_LOW;
          else                            hold_q  <= hold_q + 1'b1;
        end
        default:  state_q <= S_LOW;
      endcase
    end
  end

  assign pps_pulse = (state_q == S_EDGE);

  // A strobe is never longer than one cycle.
  logic pulse_q;
  always_ff @(posedge clk) begin
    pulse_q <= pps_pulse;
    if (rst_n) a_single_strobe: assert (!pps_pulse || !pulse_q);
  end
  assign pps_level = (state_q == S_EDGE) || (state_q == S_HOLD_H) || (state_q == S_HIGH);

endmodule
