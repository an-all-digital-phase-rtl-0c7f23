// coarse_control: the coarse control-bit register with its adder.
//
// In each update slot that is enabled (valid period error, not locked, no
// hit, no hold) the coarse word becomes
//   coarse + (dt << GAIN_SHIFT)
// clamped to 0..63. dt is a period error in TDC steps (20 ps); the coarse
// step of the DCO is 10 ps, so GAIN_SHIFT = 1 turns the error into the code
// change that cancels it in one update, which relies on the DCO being
// linear. A positive dt (DCO too slow) raises the code; in this design a
// higher code shortens the DCO period. The register is clocked by the
// falling DCO edge so the new word reaches the DCO before its next rising
// edge. Reset value COARSE_INIT = 32. The adder-and-register structure
// follows the design; the gain as a shift and the clamping are this
// design's choices.
module coarse_control
  import adpll_pkg::*;
#(
  parameter int unsigned GAIN_SHIFT = 1,
  parameter coarse_t     INIT       = COARSE_INIT
) (
  input  logic    clk,     // DCO clock; falling edge
  input  logic    rst_n,
  input  logic    en,      // apply dt in this slot
  input  dt_t     dt,
  output coarse_t coarse
);
  timeunit 1ps; timeprecision 1fs;

  localparam int CMAX = (1 << CW_W) - 1;

  int next_code;

  always_comb begin
    next_code = int'(coarse) + (int'(dt) <<< GAIN_SHIFT);
    if (next_code < 0)    next_code = 0;
    if (next_code > CMAX) next_code = CMAX;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)  coarse <= INIT;
    else if (en) coarse <= coarse_t'(next_code);
  end
endmodule
