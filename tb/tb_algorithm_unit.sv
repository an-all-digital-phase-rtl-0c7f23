// tb_algorithm_unit: random TDC words and counts against a reference model.
// Every DCO cycle the test applies random T1/T2 words (in either order) and
// a count that grows by N = 0..4. On each falling edge the model keeps its
// own previous T1 (the smaller word) and count; in every update slot it
// checks dt = (T1 - T1') + (N - 2)(T2 - T1). It also checks that upd
// alternates (one measurement cycle, one update cycle), that dt_ok is low
// before the first stored T1', and the design's example words.
module tb_algorithm_unit;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1, tdc_ok = 1'b1;
  tdc_word_t t1_in, t2_in;
  ncnt_t cnt;
  dt_t dt; logic dt_ok, upd;
  int checks = 0, failures = 0;

  algorithm_unit dut (.*);

  always #700 clk = ~clk;

  initial #1 rst_n = 1'b0;   // reset edge for the asynchronous reset

  initial begin
    #100000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_t1p, m_cntp, lo, hi, n, expect_dt, n_upd = 0;
  logic prev_upd;

  initial begin
    t1_in = '0; t2_in = '0; cnt = '0;
    m_t1p = 0; m_cntp = 0;
    #300 rst_n = 1'b1;
    @(posedge clk); #1;
    checks++; if (dt_ok) begin failures++; $display("FAIL: dt_ok before first T1'"); end
    prev_upd = upd;
    for (int k = 0; k < 400; k++) begin
      @(posedge clk); #1;
      if (k == 10) begin t1_in = 7'b0010_010; t2_in = 7'b0110_101; end   // design's example
      else begin t1_in = 7'($urandom_range(8, 90)); t2_in = 7'($urandom_range(8, 90)); end
      cnt = cnt + 4'($urandom_range(0, 4));
      lo = (t1_in < t2_in) ? t1_in : t2_in;
      hi = (t1_in < t2_in) ? t2_in : t1_in;
      n  = int'(4'(cnt - 4'(m_cntp)));
      expect_dt = (lo - m_t1p) + (n - 2) * (hi - lo);
      #600;   // just before the falling edge that acts on dt
      if (k > 0) begin
        checks++;
        if (upd == prev_upd) begin failures++; $display("FAIL: upd did not alternate"); end
      end
      prev_upd = upd;
      if (upd) begin
        n_upd++;
        checks++;
        if (!dt_ok || int'(dt) != expect_dt) begin
          failures++;
          $display("FAIL: k=%0d dt=%0d expected %0d (lo %0d t1p %0d n %0d hi %0d)", k, dt, expect_dt, lo, m_t1p, n, hi);
        end
      end
      @(negedge clk);
      m_t1p = lo; m_cntp = int'(cnt);
    end
    checks++; if (n_upd < 150) begin failures++; $display("FAIL: too few update slots"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
