// delay_meter: measures the signed delay between the internally built 1PPS
// and the GPS 1PPS, in master-clock cycles.
//
// A small state machine waits for either rising-edge strobe. The first one
// to arrive enables a counter; the other one stops it. The delay is positive
// when the GPS pulse comes after the internal pulse and negative when it
// comes before (the internal edge is the start point, the GPS edge the end
// point). Both strobes in the same cycle give zero. If the second edge has
// not come within MAX_DELAY cycles the measurement is dropped (timeout), and
// a repeated edge of the same kind restarts the count from the new edge.
//
// Interface: int_edge and gps_edge are one-cycle strobes in the master clock
// domain. delay/valid: result and its one-cycle strobe; timeout: one-cycle
// strobe for a dropped measurement.
// Timing: valid is high one clock after the closing edge.
// Measuring the delay with a state machine that enables a counter between
// the two rising edges follows the design description; MAX_DELAY (a
// quarter of the nominal second by default) and the restart rule are this
// design's choices.
module delay_meter
  import gps_timing_pkg::*;
#(
  parameter int unsigned MAX_DELAY = F_CLK_DEFAULT / F_REF_DEFAULT / 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   int_edge,
  input  logic   gps_edge,
  output delay_t delay,
  output logic   valid,
  output logic   timeout
);

  typedef enum logic [1:0] {
    M_IDLE,     // no edge pending
    M_INT_1ST,  // internal edge seen, waiting for the GPS edge
    M_GPS_1ST   // GPS edge seen, waiting for the internal edge
  } mstate_t;

  mstate_t state_q;
  len_t    cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= M_IDLE;
      cnt_q   <= '0;
      delay   <= '0;
      valid   <= 1'b0;
      timeout <= 1'b0;
    end else begin
      valid   <= 1'b0;
      timeout <= 1'b0;
      unique case (state_q)
        M_IDLE: begin
          cnt_q <= len_t'(1);
          if (int_edge && gps_edge) begin
            delay <= '0;
            valid <= 1'b1;
          end else if (int_edge) begin
            state_q <= M_INT_1ST;
          end else if (gps_edge) begin
            state_q <= M_GPS_1ST;
          end
        end
        M_INT_1ST: begin
          if (gps_edge) begin
            delay   <= delay_t'(cnt_q);
            valid   <= 1'b1;
            state_q <= M_IDLE;
          end else if (int_edge || cnt_q >= len_t'(MAX_DELAY)) begin
            timeout <= 1'b1;
            cnt_q   <= len_t'(1);
            if (!int_edge) state_q <= M_IDLE;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        M_GPS_1ST: begin
          if (int_edge) begin
            delay   <= -delay_t'(cnt_q);
            valid   <= 1'b1;
            state_q <= M_IDLE;
          end else if (gps_edge || cnt_q >= len_t'(MAX_DELAY)) begin
            timeout <= 1'b1;
            cnt_q   <= len_t'(1);
            if (!gps_edge) state_q <= M_IDLE;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        default: state_q <= M_IDLE;
      endcase
    end
  end

  // A result strobe lasts one cycle and is never given for a timeout.
  logic valid_q;
  always_ff @(posedge clk) begin
    valid_q <= valid;
    if (rst_n) a_valid_pulse: assert (!valid || (!timeout && !valid_q));
  end

endmodule
