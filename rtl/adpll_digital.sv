// adpll_digital: all the synthesizable logic of the ADPLL, without the
// oscillator and the delay cells.
//
// Frequency acquisition: on every rising DCO edge the fractional TDC samples
// the reference delay line and the integer counter samples the reference
// transition count. The algorithm unit turns T1, T2 and N into the DCO
// period error dT, and every second DCO cycle (one cycle to measure, one to
// update) the coarse word moves by 2*dT. When |dT| <= 1 TDC step the lock
// indicator fires and the coarse word is stored.
// Phase acquisition: the control unit, clocked by the reference, then stops
// the DCO for the low half of one reference cycle, restarts it on the
// reference's rising edge and raises hold; the edge detector and the
// shift-register loop then steer the fine word each DCO cycle.
//
// Clocks: dco_clk (rising edge: TDC and counter sampling, edge detector;
// falling edge: algorithm, coarse and fine registers), dco_clk_dly (buffered
// DCO clock for register 2 of the integer counter), ref_clk (control unit)
// and ref_tap0 (reference after the first buffer of the TDC chain, for the
// transition counter, so that it sees edges at the same time as the chain).
// rst_n is an asynchronous active-low reset for all registers.
module adpll_digital
  import adpll_pkg::*;
#(
  parameter int unsigned GAIN_SHIFT = 1,
  parameter int unsigned LOCK_TOL   = 1,
  parameter int unsigned LOCK_COUNT = 1
) (
  input  logic                rst_n,
  input  logic                ref_clk,
  input  logic                ref_tap0,
  input  logic [TDC_TAPS-1:0] taps,
  input  logic                dco_clk,
  input  logic                dco_clk_dly,
  output coarse_t             coarse,
  output fine_t               fine,
  output logic                dco_rst,
  output logic                freq_lock,
  output logic                hold,
  output logic                phase_lock,
  output dt_t                 dt,
  output logic                dt_upd,     // dt applied in this slot
  output logic                fine_flip,  // fine loop saw a polarity change
  output fine_t               fine_step,  // shift-register contents
  output ctl_state_e          ctl_state   // control unit counter
);
  timeunit 1ps; timeprecision 1fs;

  tdc_word_t  t1, t2;
  logic       t1_found, t2_found, first_blk_edge;
  ncnt_t      cnt;
  logic       dt_ok, upd, hit, phase_en, ahead, behind;

  tdc_fractional u_tdc (
    .clk            (dco_clk),
    .rst_n          (rst_n),
    .taps           (taps),
    .t1             (t1),
    .t2             (t2),
    .t1_found       (t1_found),
    .t2_found       (t2_found),
    .first_blk_edge (first_blk_edge)
  );

  integer_counter u_icnt (
    .ref_clk     (ref_tap0),
    .dco_clk     (dco_clk),
    .dco_clk_dly (dco_clk_dly),
    .rst_n       (rst_n),
    .sel         (first_blk_edge),
    .cnt         (cnt)
  );

  algorithm_unit u_alg (
    .clk    (dco_clk),
    .rst_n  (rst_n),
    .t1_in  (t1),
    .t2_in  (t2),
    .tdc_ok (t1_found && t2_found),
    .cnt    (cnt),
    .dt     (dt),
    .dt_ok  (dt_ok),
    .upd    (upd)
  );

  lock_indicator #(
    .LOCK_TOL   (LOCK_TOL),
    .LOCK_COUNT (LOCK_COUNT)
  ) u_lock (
    .clk   (dco_clk),
    .rst_n (rst_n),
    .upd   (upd),
    .dt_ok (dt_ok),
    .dt    (dt),
    .hit   (hit),
    .lock  (freq_lock)
  );

  assign dt_upd = upd && dt_ok && !hit && !freq_lock && !hold;

  coarse_control #(
    .GAIN_SHIFT (GAIN_SHIFT)
  ) u_coarse (
    .clk    (dco_clk),
    .rst_n  (rst_n),
    .en     (dt_upd),
    .dt     (dt),
    .coarse (coarse)
  );

  control_unit u_ctl (
    .ref_clk  (ref_clk),
    .rst_n    (rst_n),
    .set      (freq_lock),
    .state    (ctl_state),
    .dco_rst  (dco_rst),
    .hold     (hold),
    .phase_en (phase_en)
  );

  edge_detector u_ed (
    .dco_clk (dco_clk),
    .rst_n   (rst_n),
    .ref_clk (ref_clk),
    .ahead   (ahead),
    .behind  (behind)
  );

  fine_phase_unit u_fine (
    .clk        (dco_clk),
    .rst_n      (rst_n),
    .en         (phase_en),
    .behind     (behind),
    .fine       (fine),
    .step       (fine_step),
    .phase_lock (phase_lock),
    .flip       (fine_flip)
  );

  // ahead and behind are complements; the fine loop uses behind only.
  always_ff @(posedge dco_clk) assert (ahead == !behind)
    else $error("edge detector outputs not complementary");
endmodule
