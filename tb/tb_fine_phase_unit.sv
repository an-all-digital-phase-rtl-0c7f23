// tb_fine_phase_unit: checks the doubling-step phase loop.
// A steady "ahead" must give the fine words 31, 29, 25, 17, 1, 0 (steps 1, 2,
// 4, 8, 16, 32 with clamping) and a polarity change must return the word to
// 32 with step 1 and set phase_lock. Random polarity sequences are then
// compared with a reference model; with en low the word must stay at 32.
module tb_fine_phase_unit;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, behind = 1'b0;
  fine_t fine, step; logic phase_lock, flip;
  int checks = 0, failures = 0;

  fine_phase_unit dut (.*);

  always #700 clk = ~clk;

  initial #1 rst_n = 1'b0;   // reset edge for the asynchronous reset

  initial begin
    #100000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_fine, m_step, m_prev; bit m_started, m_lock;

  task automatic cycle(input logic b);
    @(posedge clk); #1 behind = b;
    @(negedge clk);
    if (!en) begin m_fine = 32; m_step = 1; m_started = 0; end
    else begin
      if (m_started && b != m_prev) begin m_fine = 32; m_step = 1; m_lock = 1; end
      else begin
        m_fine = b ? m_fine + m_step : m_fine - m_step;
        if (m_fine < 0) m_fine = 0;
        if (m_fine > 63) m_fine = 63;
        if (m_step < 32) m_step = m_step * 2;
      end
      m_started = 1; m_prev = b;
    end
    #1;
    checks++;
    if (int'(fine) != m_fine || int'(step) != m_step || phase_lock !== m_lock) begin
      failures++;
      $display("FAIL: fine %0d/%0d step %0d/%0d lock %b/%b", fine, m_fine, step, m_step, phase_lock, m_lock);
    end
  endtask

  initial begin
    int seq [6] = '{31, 29, 25, 17, 1, 0};
    m_fine = 32; m_step = 1; m_started = 0; m_lock = 0; m_prev = 0;
    #300 rst_n = 1'b1;
    repeat (3) cycle(1'b1);          // disabled: stays at 32
    en = 1'b1;
    for (int i = 0; i < 6; i++) begin
      cycle(1'b0);
      checks++;
      if (int'(fine) != seq[i]) begin failures++; $display("FAIL: sequence step %0d fine %0d", i, fine); end
    end
    cycle(1'b1);
    checks++;
    if (fine != 6'd32 || step != 6'd1 || !phase_lock) begin failures++; $display("FAIL: no reset on flip"); end
    for (int k = 0; k < 400; k++) begin
      if (k == 300) en = 1'b0;
      if (k == 320) en = 1'b1;
      cycle(($urandom_range(0, 3) == 0) ? !m_prev[0] : m_prev[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
