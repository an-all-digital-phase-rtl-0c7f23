// tb_lock_indicator: random period errors against a reference model.
// Two instances: the default (tolerance 1, one hit) and one needing three
// hits in a row within tolerance 2. The model counts consecutive hits in
// update slots with a valid error and predicts hit and lock; lock must stay
// high once set.
module tb_lock_indicator;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1, upd = 1'b0, dt_ok = 1'b0;
  dt_t dt;
  logic hit_a, lock_a, hit_b, lock_b;
  int checks = 0, failures = 0;

  lock_indicator dut_a (.clk, .rst_n, .upd, .dt_ok, .dt, .hit(hit_a), .lock(lock_a));
  lock_indicator #(.LOCK_TOL(2), .LOCK_COUNT(3)) dut_b (.clk, .rst_n, .upd, .dt_ok, .dt, .hit(hit_b), .lock(lock_b));

  always #700 clk = ~clk;

  initial begin
    #100000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int run_a = 0, run_b = 0; bit m_lock_a = 0, m_lock_b = 0; bit e_hit_a, e_hit_b;
  int n_locks = 0;

  initial begin
    dt = '0;
    for (int trial = 0; trial < 40; trial++) begin
      @(posedge clk); rst_n = 1'b0; upd = 1'b0; run_a = 0; run_b = 0; m_lock_a = 0; m_lock_b = 0;
      @(posedge clk); #1 rst_n = 1'b1;
      for (int k = 0; k < 30; k++) begin
        @(posedge clk); #1;
        upd   = 1'($urandom_range(0, 1));
        dt_ok = ($urandom_range(0, 7) != 0);
        dt    = dt_t'(int'($urandom_range(0, 8)) - 4 + ((trial % 3 == 0) ? 10 : 0));
        e_hit_a = upd && dt_ok && dt >= -1 && dt <= 1;
        e_hit_b = upd && dt_ok && dt >= -2 && dt <= 2;
        #100;
        checks++;
        if (hit_a !== e_hit_a || hit_b !== e_hit_b) begin failures++; $display("FAIL: hit"); end
        @(negedge clk);
        if (upd && dt_ok && !m_lock_a) begin run_a = e_hit_a ? run_a + 1 : 0; if (run_a >= 1) m_lock_a = 1; end
        if (upd && dt_ok && !m_lock_b) begin run_b = e_hit_b ? run_b + 1 : 0; if (run_b >= 3) m_lock_b = 1; end
        #1;
        checks++;
        if (lock_a !== m_lock_a || lock_b !== m_lock_b) begin
          failures++; $display("FAIL: lock a=%b/%b b=%b/%b", lock_a, m_lock_a, lock_b, m_lock_b);
        end
      end
      if (m_lock_b) n_locks++;
    end
    checks++; if (n_locks == 0) begin failures++; $display("FAIL: three-hit lock never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
