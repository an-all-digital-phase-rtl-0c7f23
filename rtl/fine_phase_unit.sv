// fine_phase_unit: shift register, add/subtract unit and fine control-bit
// register of the phase acquisition.
//
// While en is high, every DCO cycle:
//   - if the edge detector's polarity equals the previous one (or this is
//     the first cycle), fine = fine + step when the DCO is behind (a higher
//     fine code shortens the period) or fine - step when it is ahead,
//     clamped to 0..63; then the step (the shift register) shifts left by
//     one bit: 1, 2, 4, 8, 16, 32, and stays at 32;
//   - if the polarity changed, fine returns to FINE_INIT (32) and the step
//     to 1. The first change marks the end of phase acquisition (phase_lock,
//     which stays high); the loop keeps running to hold the phase.
// While en is low, fine stays at FINE_INIT and the step at 1.
// Registers use the falling DCO edge, after the detector's rising-edge
// sample, so a new fine word reaches the DCO before its next rising edge.
// The doubling step and the reset on a polarity change follow the design;
// clamping and holding the step at 32 are this design's choices.
module fine_phase_unit
  import adpll_pkg::*;
(
  input  logic  clk,      // DCO clock; falling edge
  input  logic  rst_n,
  input  logic  en,
  input  logic  behind,   // 1: DCO behind, 0: DCO ahead
  output fine_t fine,
  output fine_t step,
  output logic  phase_lock,
  output logic  flip      // polarity change seen in this cycle
);
  timeunit 1ps; timeprecision 1fs;

  localparam int FMAX = (1 << FW_W) - 1;

  logic started, prev_behind;
  int   nxt;

  always_comb begin
    nxt = behind ? int'(fine) + int'(step) : int'(fine) - int'(step);
    if (nxt < 0)    nxt = 0;
    if (nxt > FMAX) nxt = FMAX;
  end

  assign flip = en && started && (behind != prev_behind);

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fine        <= FINE_INIT;
      step        <= fine_t'(1);
      started     <= 1'b0;
      prev_behind <= 1'b0;
      phase_lock  <= 1'b0;
    end else if (!en) begin
      fine        <= FINE_INIT;
      step        <= fine_t'(1);
      started     <= 1'b0;
    end else begin
      started     <= 1'b1;
      prev_behind <= behind;
      if (flip) begin
        fine       <= FINE_INIT;
        step       <= fine_t'(1);
        phase_lock <= 1'b1;
      end else begin
        fine <= fine_t'(nxt);
        if (!step[FW_W-1]) step <= step << 1;
      end
    end
  end
endmodule
