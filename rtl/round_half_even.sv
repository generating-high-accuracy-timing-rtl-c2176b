// round_half_even: rounds an unsigned fixed-point length to a whole number
// of master clocks.
//
// The integer part is kept when the fraction is below one half and
// incremented when it is above. An exact half goes to the even neighbour:
// down when the integer part's LSB is 0, up when it is 1. Ties therefore
// round up and down equally often and add no bias to the output period.
//
// Interface: x has IW integer bits over FRAC fraction bits; y is the rounded
// integer (IW bits, wrapping only if the integer part is all ones and the
// value rounds up). Purely combinational.
// The rounding rule follows the design description; the widths are this
// design's choice.
module round_half_even #(
  parameter int IW   = 32,
  parameter int FRAC = 8
) (
  input  logic [IW+FRAC-1:0] x,
  output logic [IW-1:0]      y
);

  logic [IW-1:0]   ipart;
  logic [FRAC-1:0] fpart;
  logic [FRAC-1:0] half;
  logic            up;

  assign ipart = x[IW+FRAC-1:FRAC];
  assign fpart = x[FRAC-1:0];
  assign half  = {1'b1, {(FRAC-1){1'b0}}};
  assign up    = (fpart > half) || ((fpart == half) && ipart[0]);
  assign y     = ipart + IW'(up);

  initial assert (FRAC >= 1) else $error("round_half_even: FRAC must be at least 1");

endmodule
