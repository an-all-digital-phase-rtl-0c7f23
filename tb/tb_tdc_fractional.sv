// tb_tdc_fractional: drives the sampled-tap pattern directly.
// First the decoding example of the design: 10 zeros, 35 ones, 35 zeros,
// then ones, must give T1 = 0010_010 and T2 = 0110_101. Then random
// patterns: level L up to tap a-1, the other level for h taps, and so on;
// the expected words are {a/8 + 1, a%8} for the first change and
// {(a+h)/8 + 1, (a+h)%8} for the second, assigned to T1/T2 by direction.
// Also checks the first-block flag and the not-found case.
module tb_tdc_fractional;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [TDC_TAPS-1:0] taps;
  tdc_word_t t1, t2;
  logic t1_found, t2_found, first_blk_edge;
  int checks = 0, failures = 0;

  tdc_fractional dut (.*);

  always #500 clk = ~clk;

  initial #1 rst_n = 1'b0;   // reset edge for the asynchronous reset

  initial begin
    #10000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [TDC_TAPS-1:0] pattern(input logic lvl, input int a, input int h);
    logic [TDC_TAPS-1:0] p;
    for (int i = 0; i < TDC_TAPS; i++) begin
      if (i < a) p[i] = lvl;
      else       p[i] = lvl ^ (((i - a) / h) % 2 == 0);
    end
    return p;
  endfunction

  function automatic tdc_word_t word(input int pos);
    return {4'(pos / 8 + 1), 3'(pos % 8)};
  endfunction

  task automatic apply(input logic [TDC_TAPS-1:0] p);
    @(negedge clk); taps = p; @(posedge clk); #1;
  endtask

  task automatic expect_words(input tdc_word_t e1, input tdc_word_t e2, input logic efirst, input string tag);
    checks++;
    if (!t1_found || !t2_found || t1 !== e1 || t2 !== e2 || first_blk_edge !== efirst) begin
      failures++;
      $display("FAIL %s: t1=%b t2=%b (exp %b %b) first=%b", tag, t1, t2, e1, e2, first_blk_edge);
    end
  endtask

  initial begin
    taps = '0;
    #1200 rst_n = 1'b1;
    // Example of the design
    apply(pattern(1'b0, 10, 35));
    expect_words(7'b0010_010, 7'b0110_101, 1'b0, "example");
    // Random patterns
    for (int n = 0; n < 300; n++) begin
      int a, h; logic lvl;
      a = 1 + int'($urandom_range(0, 40));
      h = 9 + int'($urandom_range(0, 40));
      lvl = 1'($urandom_range(0, 1));
      apply(pattern(lvl, a, h));
      if (lvl == 1'b0) expect_words(word(a), word(a + h), a <= 7, "rand0");
      else             expect_words(word(a + h), word(a), a <= 7, "rand1");
    end
    // No transition at all
    apply('0);
    checks++;
    if (t1_found || t2_found) begin failures++; $display("FAIL: transition found in flat pattern"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
