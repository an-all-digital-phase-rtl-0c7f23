// dco: behavioural model of the digitally controlled ring oscillator (an
// analog circuit; this model is for simulation, not synthesis).
//
// The ring holds two coarse cells (thermometer lines a_th, b_th), a chain of
// three fixed delay stages picked through a 4:1 mux (fix_sel), a fine cell
// (lines d_th = D(0)..D(8)) and a NAND gate whose second input is the ring's
// enable. The model turns the lines into an output period
//   P = P_MAX_PS - KC_PS*(|a| + 4|b| + 16*fix_sel) - KF_PS*(|D0..2| + 4|D3..5| + 16|D6..8|)
// where |x| is the number of lines set. KC_PS = 10 ps and KF_PS = 1 ps are the
// coarse and fine steps the design states. P_MAX_PS = 1912 ps is this model's
// choice: with the fine word at its mid value 32 the coarse word then spans
// 532-800 MHz (coarse 63 gives exactly 1250 ps), which covers the stated
// 570-800 MHz tuning range, and 700 MHz falls at coarse 45, close to the
// coarse word of about 50 at which the design locks at 700 MHz.
// The model is linear; the real cell is only close to linear.
//
// Timing: a ring's delay cells respond to the code while an edge travels
// through them, so each half period is taken from the code SAMPLE_PS (1 ps)
// after the edge that starts it; a word written on the falling edge thus
// already sets the low half of the same cycle. Duty cycle is 50% for a
// steady code. While rst is high the output is forced low (the ring's
// enable is low). When rst falls, the first rising edge comes START_PS
// later (one gate delay), which aligns the DCO to the edge that released it.
module dco
#(
  parameter real P_MAX_PS = 1912.0,
  parameter real KC_PS    = 10.0,
  parameter real KF_PS    = 1.0,
  parameter real START_PS = 5.0,
  parameter real SAMPLE_PS = 1.0
) (
  input  logic [2:0] a_th,
  input  logic [2:0] b_th,
  input  logic [1:0] fix_sel,
  input  logic [8:0] d_th,
  input  logic       rst,
  output logic       out
);
  timeunit 1ps; timeprecision 1fs;

  real half_ps;

  function automatic real period_ps();
    int unsigned c, f;
    c = $countones(a_th) + 4 * $countones(b_th) + 16 * int'(fix_sel);
    f = $countones(d_th[2:0]) + 4 * $countones(d_th[5:3]) + 16 * $countones(d_th[8:6]);
    return P_MAX_PS - KC_PS * real'(c) - KF_PS * real'(f);
  endfunction

  // Wait for the given time, or less if rst rises first.
  task automatic wait_or_rst(input real t);
    fork
      #(t);
      @(posedge rst);
    join_any
    disable fork;
  endtask

  initial begin
    out = 1'b0;
    forever begin
      if (rst) begin
        out = 1'b0;
        wait (!rst);
        #(START_PS);
      end else begin
        out = 1'b1;
        wait_or_rst(SAMPLE_PS);
        half_ps = period_ps() / 2.0;
        if (!rst) wait_or_rst(half_ps - SAMPLE_PS);
        out = 1'b0;
        if (!rst) wait_or_rst(SAMPLE_PS);
        half_ps = period_ps() / 2.0;
        if (!rst) wait_or_rst(half_ps - SAMPLE_PS);
      end
    end
  end
endmodule
