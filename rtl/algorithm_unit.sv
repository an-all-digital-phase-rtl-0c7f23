// algorithm_unit: computes the DCO period error from the TDC words,
//   dT = (T1 - T1') + (N - 2) * (T2 - T1)
// in TDC steps, where T2 - T1 is half the reference period, T1' is T1 one
// DCO period earlier and N is the number of reference transitions in that
// period. dT > 0 means the DCO period is longer than the reference period.
//
// Datapath: a comparator orders the two TDC words so that T1 <= T2
// (T1 is then the time since the latest reference edge), a subtractor forms
// T2 - T1, a multiplier forms (N - 2)(T2 - T1), a second subtractor forms
// T1 - T1', and an adder sums them. T1' and the previous transition count are
// held in registers clocked by the falling DCO edge, which stands in for the
// buffered clock of the design.
//
// Schedule: each update takes two DCO cycles, one to measure and one to
// update. A slot bit toggles on every falling edge; upd is high during the
// update slot, and dt is then the error over the DCO period that just ended
// (which started after the previous update had reached the DCO). The coarse
// word register and the lock indicator take dt on that falling edge, so the
// design's output register is merged with the coarse-word register here.
// dt_ok is low when either TDC word was not found. Asynchronous reset starts
// in the measurement slot.
module algorithm_unit
  import adpll_pkg::*;
(
  input  logic      clk,       // DCO clock; registers use its falling edge
  input  logic      rst_n,
  input  tdc_word_t t1_in,
  input  tdc_word_t t2_in,
  input  logic      tdc_ok,    // both TDC words valid
  input  ncnt_t     cnt,       // sampled transition count
  output dt_t       dt,
  output logic      dt_ok,
  output logic      upd        // update slot
);
  timeunit 1ps; timeprecision 1fs;

  tdc_word_t t1, t2, t1_prev;
  ncnt_t     cnt_prev, n;
  logic      primed;
  logic signed [TDC_W:0]   half_t;   // T2 - T1, non-negative
  logic signed [NCNT_W+1:0] n_m2;    // N - 2
  logic signed [TDC_W+1:0] d1;       // T1 - T1'
  dt_t                     prod;

  // Comparator
  always_comb begin
    if (t1_in <= t2_in) begin t1 = t1_in; t2 = t2_in; end
    else                begin t1 = t2_in; t2 = t1_in; end
  end

  assign n      = cnt - cnt_prev;
  assign half_t = $signed({1'b0, t2}) - $signed({1'b0, t1});
  assign n_m2   = $signed({2'b00, n}) - 6'sd2;
  assign d1     = $signed({2'b00, t1}) - $signed({2'b00, t1_prev});
  assign prod   = DT_W'(n_m2) * DT_W'(half_t);
  assign dt     = prod + DT_W'(d1);
  assign dt_ok  = tdc_ok && primed;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1_prev  <= '0;
      cnt_prev <= '0;
      upd      <= 1'b0;
      primed   <= 1'b0;
    end else begin
      t1_prev  <= t1;
      cnt_prev <= cnt;
      upd      <= !upd;
      primed   <= 1'b1;
    end
  end
endmodule
