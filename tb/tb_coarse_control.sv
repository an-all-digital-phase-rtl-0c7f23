// tb_coarse_control: random period errors and enables against a model of
// coarse <- clamp(coarse + 2*dt, 0, 63), with the reset value 32 and the
// word unchanged when en is low.
module tb_coarse_control;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  dt_t dt; coarse_t coarse;
  int checks = 0, failures = 0;

  coarse_control dut (.*);

  always #700 clk = ~clk;

  initial #1 rst_n = 1'b0;   // reset edge for the asynchronous reset

  initial begin
    #100000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int model;
  initial begin
    dt = '0;
    #300;
    checks++; if (coarse !== 6'd32) begin failures++; $display("FAIL: reset value %0d", coarse); end
    rst_n = 1'b1; model = 32;
    for (int k = 0; k < 500; k++) begin
      @(posedge clk); #1;
      en = 1'($urandom_range(0, 1));
      dt = dt_t'(int'($urandom_range(0, 40)) - 20);
      @(negedge clk);
      if (en) begin
        model = model + 2 * int'(dt);
        if (model < 0) model = 0;
        if (model > 63) model = 63;
      end
      #1;
      checks++;
      if (int'(coarse) != model) begin failures++; $display("FAIL: k=%0d coarse %0d expected %0d", k, coarse, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
