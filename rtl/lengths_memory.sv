// lengths_memory: the "clock lengths memory" holding the last accepted
// measurement for the output builders.
//
// A register of one lengths_t record (period, quotient, remainder). It is
// written only when the synchronizer enables it, in the cycle of a valid GPS
// pulse, so the builders always read a measurement that passed the window
// test. valid tells that at least one measurement has been stored since
// reset.
//
// Interface: save (write enable, one cycle), din (measurement), dout, valid.
// Timing: dout shows the new value one clock after save.
// The memory and its write-on-valid-pulse rule follow the design
// description. There the register is clocked by the gated reset pulse; here
// it is clocked by the master clock with save as a clock enable, which keeps
// the design in one clock domain.
module lengths_memory
  import gps_timing_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     save,
  input  lengths_t din,
  output lengths_t dout,
  output logic     valid
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dout  <= '0;
      valid <= 1'b0;
    end else if (save) begin
      dout  <= din;
      valid <= 1'b1;
    end
  end

endmodule
