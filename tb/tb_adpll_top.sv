// tb_adpll_top: end-to-end test of the ADPLL with a 700 MHz reference and
// every parameter at its default.
//
// The reference period is 1428.571 ps. The loop is locked four times from
// reset, each time releasing reset at a different point of the reference
// cycle (0, 250, 500 and 1000 ps after a rising edge). Each run checks that
//   - frequency lock comes within 10 reference cycles of the release, and
//     the locked coarse word is within 2 steps of the ideal one (model:
//     P = 1912 - 10*coarse - fine ps, ideal coarse at fine 32 is 45.1);
//   - the control unit passes through 01 for exactly one reference cycle,
//     stops the DCO once, and the first DCO edge after the restart comes
//     within 20 ps after a reference rising edge;
//   - phase lock (first polarity change) comes within 20 reference cycles
//     of hold, and the control counter ends at 11;
//   - over 300 DCO cycles after phase lock every DCO rising edge stays
//     within 100 ps of the reference edge (no cycle slip), and the mean DCO
//     period equals the reference period within 0.5%.
// The peak-to-peak phase error is printed. Across all runs the test counts
// each mechanism of the loop (coarse update, lock, hold, DCO restart,
// shift-register doubling, fine increment and decrement, polarity flip, use
// of the integer counter's second register) and counts a failure for any
// that never occurred.
module tb_adpll_top;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam real TREF = 1428.571428;
  localparam int  NRUN = 4;

  logic ref_clk = 1'b0, rst_n = 1'b1;
  logic dco_clk, freq_lock, hold, phase_lock, dt_upd, fine_flip;
  coarse_t coarse; fine_t fine, fine_step; dt_t dt; ctl_state_e ctl_state;

  adpll_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always #(TREF / 2.0) ref_clk = ~ref_clk;

  // Watchdog
  initial begin
    #(TREF * 3000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_ref_rise;
  int      ref_cycles = 0;
  always @(posedge ref_clk) begin t_ref_rise = $realtime; ref_cycles++; end

  // Mechanism counters (all runs)
  int n_coarse_upd = 0, n_inc = 0, n_dec = 0, n_flip = 0, n_step_big = 0;
  int n_reg2 = 0, n_lock = 0, n_hold = 0, n_restart = 0;
  // Per-run counters
  int n_rst_state, n_dco_stop, lock_cycle, hold_cycle, plock_cycle;
  fine_t fine_q;

  always @(negedge dco_clk) if (rst_n) begin
    if (dt_upd) n_coarse_upd++;
    if (fine_flip) n_flip++;
    if (fine_step >= 4) n_step_big++;
  end
  always @(fine) begin
    if (hold && !fine_flip && fine > fine_q) n_inc++;
    if (hold && !fine_flip && fine < fine_q) n_dec++;
    fine_q = fine;
  end
  always @(posedge dco_clk) if (rst_n && dut.u_dig.first_blk_edge) n_reg2++;
  always @(negedge ref_clk) if (rst_n && ctl_state == CTL_RESET) n_rst_state++;
  always @(posedge freq_lock)  if (rst_n) begin lock_cycle  = ref_cycles; n_lock++; end
  always @(posedge hold)       if (rst_n) begin hold_cycle  = ref_cycles; n_hold++; end
  always @(posedge phase_lock) if (rst_n) plock_cycle = ref_cycles;

  // DCO stop and restart alignment
  always @(posedge dut.u_dco.rst) if (rst_n) n_dco_stop++;
  always @(negedge dut.u_dco.rst) if (rst_n && hold) begin
    @(posedge dco_clk);
    n_restart++;
    check($realtime - t_ref_rise >= 0 && $realtime - t_ref_rise <= 20.0,
          $sformatf("DCO restart %0.1f ps after Ref edge", $realtime - t_ref_rise));
  end

  // Phase tracking after phase lock
  real max_err, min_err, err;
  int  n_track;
  realtime t_first, t_last;
  always @(posedge dco_clk) if (rst_n && phase_lock && n_track < 300) begin
    err = $realtime - t_ref_rise;
    if (err > TREF / 2.0) err = err - TREF;
    if (err > max_err) max_err = err;
    if (err < min_err) min_err = err;
    if (n_track == 0) t_first = $realtime;
    t_last = $realtime;
    n_track++;
  end

  task automatic run(input real release_ps);
    int c0;
    real ratio;
    n_rst_state = 0; n_dco_stop = 0; n_track = 0;
    lock_cycle = -1; hold_cycle = -1; plock_cycle = -1;
    max_err = -1.0e9; min_err = 1.0e9;
    rst_n = 1'b0;
    repeat (3) @(posedge ref_clk);
    #(release_ps);
    rst_n = 1'b1;
    c0 = ref_cycles;
    while (n_track < 300 && ref_cycles - c0 < 600) @(posedge ref_clk);
    lock_cycle -= c0; hold_cycle -= c0; plock_cycle -= c0;
    $display("release +%0.0f ps: lock after %0d ref cycles, hold %0d, phase lock %0d; coarse=%0d; phase err %0.1f..%0.1f ps (p-p %0.1f)",
             release_ps, lock_cycle, hold_cycle, plock_cycle, coarse, min_err, max_err, max_err - min_err);
    check(lock_cycle >= 0 && lock_cycle <= 10, $sformatf("frequency lock within 10 ref cycles (%0d)", lock_cycle));
    check(coarse >= 43 && coarse <= 47, $sformatf("locked coarse word %0d near 45", coarse));
    check(hold_cycle > lock_cycle, "hold after lock");
    check(plock_cycle > 0 && plock_cycle - hold_cycle <= 20,
          $sformatf("phase lock within 20 ref cycles of hold (%0d)", plock_cycle - hold_cycle));
    check(ctl_state == CTL_DONE, "control counter stopped at 11");
    check(n_rst_state == 1, "exactly one reference cycle in state 01");
    check(n_dco_stop == 1, "DCO stopped exactly once");
    check(max_err <= 100.0 && min_err >= -100.0,
          $sformatf("phase error %0.1f..%0.1f ps stays within +/-100 ps", min_err, max_err));
    check(n_track == 300, "300 tracked DCO cycles");
    ratio = ((t_last - t_first) / 299.0) / TREF;
    check(ratio > 0.995 && ratio < 1.005, $sformatf("average DCO period ratio %0.5f", ratio));
  endtask

  initial begin
    fine_q = FINE_INIT;
    #1 rst_n = 1'b0;
    run(0.0);
    run(250.0);
    run(500.0);
    run(1000.0);
    $display("coarse updates %0d, locks %0d, holds %0d, restarts %0d, fine inc %0d dec %0d, flips %0d, steps >= 4: %0d, register 2 used %0d",
             n_coarse_upd, n_lock, n_hold, n_restart, n_inc, n_dec, n_flip, n_step_big, n_reg2);
    check(n_coarse_upd >= 1, "coarse update happened");
    check(n_lock == NRUN, "frequency lock in every run");
    check(n_hold == NRUN, "hold in every run");
    check(n_restart == NRUN, "DCO restart in every run");
    check(n_inc >= 1, "fine increment happened");
    check(n_dec >= 1, "fine decrement happened");
    check(n_flip >= 2, "polarity flips happened");
    check(n_step_big >= 1, "shift register doubled to 4 or more");
    check(n_reg2 >= 1, "integer counter register 2 selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
