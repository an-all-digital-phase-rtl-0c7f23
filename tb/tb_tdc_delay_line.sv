// tb_tdc_delay_line: sends one rising and one falling edge down the chain
// and checks, just before and just after the expected times (i+1)*20 ps,
// that tap i changes then and not earlier.
module tb_tdc_delay_line;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  logic ref_in = 1'b0;
  logic [TDC_TAPS-1:0] taps;
  int checks = 0, failures = 0;

  tdc_delay_line dut (.*);

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    ref_in = 1'b1;          // rising edge at t = 100
    fork
      for (int i = 0; i < TDC_TAPS; i += 7) begin
        automatic int k = i;
        fork begin
          #(20.0 * (k + 1) - 0.5);
          checks++; if (taps[k] !== 1'b0) begin failures++; $display("FAIL: tap %0d early", k); end
          #1.0;
          checks++; if (taps[k] !== 1'b1) begin failures++; $display("FAIL: tap %0d late", k); end
        end join_none
      end
      begin #700; ref_in = 1'b0; end   // falling edge at t = 800
    join
    #(20.0 * TDC_TAPS + 800);
    checks++; if (taps !== '0) begin failures++; $display("FAIL: falling edge did not pass"); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 800 ps after the rising edge, taps 0..34 hold the high pulse that began
  // 700 ps ago: taps 0..(x) zeros where the fall has passed.
  initial begin
    #(100 + 700 + 200.5);   // fall has passed taps 0..9 (10 taps)
    checks++;
    if (taps[9:0] !== '0 || taps[44:10] !== '1 || taps[TDC_TAPS-1:45] !== '0) begin
      failures++; $display("FAIL: pulse image wrong %b", taps[63:0]);
    end
  end
endmodule
