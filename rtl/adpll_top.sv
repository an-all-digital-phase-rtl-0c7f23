// adpll_top: the all-digital PLL with its oscillator and delay cells.
//
// A reference clock ref_clk (700 MHz in the design's main case) is matched
// by a ring DCO in two steps. First the frequency: a time-to-digital
// converter (a 128-tap, 20 ps buffer chain plus a transition counter)
// measures how much longer or shorter the DCO period is than the reference
// period, and the coarse 6-bit word is corrected by that amount, which
// takes a few reference cycles because the DCO is close to linear. Then the
// phase: the DCO is restarted on a reference rising edge and a bang-bang
// loop with a doubling step adjusts the 6-bit fine word to keep the edges
// together.
//
// Contents: adpll_digital (synthesizable), dco_code_converter
// (synthesizable), and the behavioural models dco, tdc_delay_line and
// delay_buffer, which stand for analog cells; the top is therefore a
// simulation model of the whole loop. rst_n (active low, asynchronous) stops
// the DCO and clears all registers; on release the DCO starts at coarse 32,
// fine 32. Outputs: the DCO clock, the control words, the status flags and
// a few internal signals (period error, shift register, control state) for
// observation. ref_clk is both a clock (control unit, counters) and data
// sampled by the phase detector; that double use is the nature of the
// design's edge detector.
module adpll_top
  import adpll_pkg::*;
(
  input  logic    ref_clk,
  input  logic    rst_n,
  output logic    dco_clk,
  output coarse_t coarse,
  output fine_t   fine,
  output logic    freq_lock,
  output logic    hold,
  output logic    phase_lock,
  output dt_t     dt,
  output logic    dt_upd,
  output logic    fine_flip,
  output fine_t   fine_step,
  output ctl_state_e ctl_state
);
  timeunit 1ps; timeprecision 1fs;

  logic [TDC_TAPS-1:0] taps;
  logic                dco_clk_dly, dco_rst_ctl;
  logic [2:0]          a_th, b_th;
  logic [1:0]          fix_sel;
  logic [8:0]          d_th;

  tdc_delay_line u_chain (
    .ref_in (ref_clk),
    .taps   (taps)
  );

  delay_buffer u_clkbuf (
    .a (dco_clk),
    .y (dco_clk_dly)
  );

  adpll_digital u_dig (
    .rst_n       (rst_n),
    .ref_clk     (ref_clk),
    .ref_tap0    (taps[0]),
    .taps        (taps),
    .dco_clk     (dco_clk),
    .dco_clk_dly (dco_clk_dly),
    .coarse      (coarse),
    .fine        (fine),
    .dco_rst     (dco_rst_ctl),
    .freq_lock   (freq_lock),
    .hold        (hold),
    .phase_lock  (phase_lock),
    .dt          (dt),
    .dt_upd      (dt_upd),
    .fine_flip   (fine_flip),
    .fine_step   (fine_step),
    .ctl_state   (ctl_state)
  );

  dco_code_converter u_conv (
    .coarse  (coarse),
    .fine    (fine),
    .a_th    (a_th),
    .b_th    (b_th),
    .fix_sel (fix_sel),
    .d_th    (d_th)
  );

  dco u_dco (
    .a_th    (a_th),
    .b_th    (b_th),
    .fix_sel (fix_sel),
    .d_th    (d_th),
    .rst     (!rst_n || dco_rst_ctl),
    .out     (dco_clk)
  );
endmodule
