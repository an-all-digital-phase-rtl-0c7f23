// control_unit: switches the loop from frequency to phase acquisition.
//
// A 2-bit counter clocked by the reference clock counts once the lock
// indicator's set input is high and stops at 11. Two muxes decode it:
//   dco_rst = inverted Ref in state 01, else 0: in that reference cycle the
//             DCO is stopped while Ref is low and restarts on Ref's rising
//             edge, which aligns the two clocks;
//   hold    = 0 in state 00, else 1: freezes the coarse word.
// phase_en (states 10 and 11) enables the shift register and fine word once
// the DCO has been restarted. The counter, its 11 stop and the two mux
// decodes follow the design; the constants on the mux inputs, the reset
// polarity and phase_en are this design's reading. set comes from the DCO
// clock domain; it only rises once and then stays high, so it is used
// without a synchronizer. Asynchronous active-low reset.
module control_unit
  import adpll_pkg::*;
(
  input  logic       ref_clk,
  input  logic       rst_n,
  input  logic       set,       // frequency lock
  output ctl_state_e state,
  output logic       dco_rst,
  output logic       hold,
  output logic       phase_en
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n)                          state <= CTL_FREQ;
    else if (set && state != CTL_DONE)   state <= ctl_state_e'(state + 2'd1);
  end

  assign dco_rst  = (state == CTL_RESET) ? !ref_clk : 1'b0;
  assign hold     = (state == CTL_FREQ)  ? 1'b0 : 1'b1;
  assign phase_en = state[1];
endmodule
