// tb_dco: checks the oscillator model's period law and reset behaviour.
// A code change right after a falling edge must already set that cycle's
// low half.
// For several control words it measures the time between rising edges and
// compares it with 1912 - 10*coarse - fine ps (within 0.01 ps). It then
// holds rst high, checks that the output stays low, releases rst and checks
// that the first rising edge comes 5 ps after the release.
module tb_dco;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  coarse_t coarse; fine_t fine;
  logic [2:0] a_th, b_th; logic [1:0] fix_sel; logic [8:0] d_th;
  logic rst, out;
  int checks = 0, failures = 0;

  dco_code_converter u_conv (.*);
  dco dut (.*);

  realtime t0, t1;

  initial begin
    #10000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int c, input int f);
    real expect_p;
    coarse = 6'(c); fine = 6'(f);
    repeat (2) @(posedge out);
    t0 = $realtime;
    @(posedge out);
    t1 = $realtime;
    expect_p = 1912.0 - 10.0 * c - 1.0 * f;
    checks++;
    if (t1 - t0 > expect_p + 0.01 || t1 - t0 < expect_p - 0.01) begin
      failures++;
      $display("FAIL: c=%0d f=%0d period %0.3f expected %0.3f", c, f, t1 - t0, expect_p);
    end
  endtask

  initial begin
    rst = 1'b1; coarse = '0; fine = '0;
    #1000;
    checks++; if (out !== 1'b0) begin failures++; $display("FAIL: out not low in reset"); end
    rst = 1'b0; t0 = $realtime;
    @(posedge out);
    checks++;
    if ($realtime - t0 < 4.99 || $realtime - t0 > 5.01) begin
      failures++; $display("FAIL: start delay %0.3f", $realtime - t0);
    end
    measure(0, 0);
    measure(63, 63);
    measure(48, 32);
    measure(32, 32);
    measure(17, 5);
    // A code written just after a falling edge sets the low half of the
    // same cycle: period = old/2 + new/2
    coarse = 6'd0; fine = 6'd0;
    repeat (2) @(posedge out);
    t0 = $realtime;
    @(negedge out); #0.2 coarse = 6'd20;
    @(posedge out);
    checks++;
    if ($realtime - t0 > 1912.0 / 2 + 1712.0 / 2 + 0.01 || $realtime - t0 < 1912.0 / 2 + 1712.0 / 2 - 0.01) begin
      failures++; $display("FAIL: mid-cycle code change gave %0.3f", $realtime - t0);
    end
    // Reset in mid-cycle forces the output low at once
    @(posedge out); #100; rst = 1'b1; #1;
    checks++; if (out !== 1'b0) begin failures++; $display("FAIL: reset did not stop output"); end
    #3000;
    checks++; if (out !== 1'b0) begin failures++; $display("FAIL: output moved in reset"); end
    rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
