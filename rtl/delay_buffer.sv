// delay_buffer: behavioural model of a single clock buffer (not synthesizable
// as a delay; a buffer cell in silicon).
//
// The output follows the input after DLY_PS picoseconds (transport delay).
// The integer counter uses it to give register 2 a DCO clock that arrives a
// little later than register 1's. The 20 ps default equals one TDC buffer,
// the only buffer delay the design states; the buffer in the clock path is
// taken to be the same cell (a choice of this model).
module delay_buffer #(
  parameter real DLY_PS = 20.0
) (
  input  logic a,
  output logic y
);
  timeunit 1ps; timeprecision 1fs;

  initial y = 1'b0;
  always @(a) y <= #(DLY_PS) a;
endmodule
