// tb_dco_code_converter: exhaustive test of the control-word converter.
// For every coarse and fine value it checks that each 2-bit group became a
// valid thermometer code (ones packed at the bottom) and that the weighted
// line counts (1, 4, 16 per group) add back to the binary word.
module tb_dco_code_converter;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  coarse_t coarse; fine_t fine;
  logic [2:0] a_th, b_th; logic [1:0] fix_sel; logic [8:0] d_th;
  int checks = 0, failures = 0;

  dco_code_converter dut (.*);

  function automatic bit is_therm(logic [2:0] v);
    return (v & (v + 3'd1)) == 3'd0;
  endfunction

  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 64; c++) begin
      for (int f = 0; f < 64; f += 9) begin
        coarse = 6'(c); fine = 6'(f);
        #10;
        checks++;
        if (!is_therm(a_th) || !is_therm(b_th) || !is_therm(d_th[2:0]) ||
            !is_therm(d_th[5:3]) || !is_therm(d_th[8:6])) begin
          failures++; $display("FAIL: not thermometer c=%0d f=%0d", c, f);
        end
        checks++;
        if ($countones(a_th) + 4 * $countones(b_th) + 16 * int'(fix_sel) != c) begin
          failures++; $display("FAIL: coarse weight c=%0d a=%b b=%b s=%0d", c, a_th, b_th, fix_sel);
        end
        checks++;
        if ($countones(d_th[2:0]) + 4 * $countones(d_th[5:3]) + 16 * $countones(d_th[8:6]) != f) begin
          failures++; $display("FAIL: fine weight f=%0d d=%b", f, d_th);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
