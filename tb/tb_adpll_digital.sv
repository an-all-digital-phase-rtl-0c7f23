// tb_adpll_digital: closes the loop around the synthesizable core with the
// oscillator and delay-line models and runs it at the ends and the middle of
// the tuning range: 570, 700 and 800 MHz references, each after a fresh
// reset from coarse 32 / fine 32.
// For each frequency it checks: frequency lock within 10 reference cycles;
// the locked DCO period (model: 1912 - 10*coarse - fine ps at fine 32)
// within 30 ps (1.5 TDC steps) of the reference period; phase lock within
// 20 reference cycles of hold; after phase lock every DCO rising edge within
// 100 ps of a reference rising edge; and the mean DCO period over 200
// tracked cycles equal to the reference period within 0.5%.
module tb_adpll_digital;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic ref_clk = 1'b0, rst_n = 1'b1;
  logic [TDC_TAPS-1:0] taps;
  logic dco_clk, dco_clk_dly, dco_rst;
  coarse_t coarse; fine_t fine, fine_step;
  logic freq_lock, hold, phase_lock, dt_upd, fine_flip;
  dt_t dt; ctl_state_e ctl_state;
  logic [2:0] a_th, b_th; logic [1:0] fix_sel; logic [8:0] d_th;

  tdc_delay_line u_chain (.ref_in(ref_clk), .taps(taps));
  delay_buffer   u_buf   (.a(dco_clk), .y(dco_clk_dly));
  adpll_digital  dut (
    .rst_n, .ref_clk, .ref_tap0(taps[0]), .taps, .dco_clk, .dco_clk_dly,
    .coarse, .fine, .dco_rst, .freq_lock, .hold, .phase_lock, .dt, .dt_upd,
    .fine_flip, .fine_step, .ctl_state
  );
  dco_code_converter u_conv (.coarse, .fine, .a_th, .b_th, .fix_sel, .d_th);
  dco u_dco (.a_th, .b_th, .fix_sel, .d_th, .rst(!rst_n || dco_rst), .out(dco_clk));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real tref = 1428.571428;
  bit  run_ref = 1'b1;
  always begin
    #(tref / 2.0) ref_clk = run_ref ? !ref_clk : 1'b0;
  end

  initial begin
    #40000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_ref_rise;
  int ref_cycles = 0;
  always @(posedge ref_clk) begin t_ref_rise = $realtime; ref_cycles++; end

  real err, max_abs;
  int  n_track;
  realtime t_first, t_last;
  always @(posedge dco_clk) if (phase_lock && n_track < 200) begin
    err = $realtime - t_ref_rise;
    if (err > tref / 2.0) err = err - tref;
    if (err < 0) err = -err;
    if (err > max_abs) max_abs = err;
    if (n_track == 0) t_first = $realtime;
    t_last = $realtime;
    n_track++;
  end

  task automatic run_at(input real mhz);
    int c0, c_lock, c_hold, c_plock;
    real p_lock;
    tref = 1.0e6 / mhz;
    max_abs = 0.0; n_track = 0;
    rst_n = 1'b0;
    repeat (3) @(posedge ref_clk);
    rst_n = 1'b1;
    c0 = ref_cycles;
    c_lock = -1; c_hold = -1; c_plock = -1;
    while (ref_cycles - c0 < 400 && n_track < 200) begin
      @(posedge ref_clk);
      if (freq_lock && c_lock < 0) c_lock = ref_cycles - c0;
      if (hold && c_hold < 0) c_hold = ref_cycles - c0;
      if (phase_lock && c_plock < 0) c_plock = ref_cycles - c0;
    end
    p_lock = 1912.0 - 10.0 * real'(coarse) - 32.0;
    $display("%0.0f MHz: freq lock after %0d ref cycles (coarse %0d), hold %0d, phase lock %0d, max |phase err| %0.1f ps",
             mhz, c_lock, coarse, c_hold, c_plock, max_abs);
    check(c_lock >= 0 && c_lock <= 10, $sformatf("%0.0f MHz frequency lock in %0d cycles", mhz, c_lock));
    check(p_lock - tref <= 30.0 && tref - p_lock <= 30.0,
          $sformatf("%0.0f MHz locked period %0.1f vs %0.1f ps", mhz, p_lock, tref));
    check(c_plock >= 0 && c_plock - c_hold <= 20, $sformatf("%0.0f MHz phase lock", mhz));
    check(max_abs <= 100.0, $sformatf("%0.0f MHz phase error %0.1f ps", mhz, max_abs));
    check(n_track == 200 && (t_last - t_first) / 199.0 / tref > 0.995 &&
          (t_last - t_first) / 199.0 / tref < 1.005, $sformatf("%0.0f MHz mean frequency", mhz));
  endtask

  initial begin
    #1 rst_n = 1'b0;
    run_at(700.0);
    run_at(570.0);
    run_at(800.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
