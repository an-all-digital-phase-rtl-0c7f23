// tb_control_unit: checks the mode sequence.
// Before set the counter stays at 00 (no hold, no DCO reset). After set it
// steps once per reference rising edge through 01, 10 and stops at 11. In
// state 01 dco_rst must be high exactly while Ref is low; hold must be high
// from state 01 on, and phase_en from state 10 on.
module tb_control_unit;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic ref_clk = 1'b0, rst_n = 1'b1, set = 1'b0;
  ctl_state_e state; logic dco_rst, hold, phase_en;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #714 ref_clk = ~ref_clk;

  initial #1 rst_n = 1'b0;   // reset edge for the asynchronous reset

  initial begin
    #100000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic [1:0] st, input string tag);
    checks++;
    if (state !== ctl_state_e'(st) || hold !== (st != 2'b00) || phase_en !== st[1] ||
        dco_rst !== ((st == 2'b01) && !ref_clk)) begin
      failures++;
      $display("FAIL %s: state=%b hold=%b phase_en=%b dco_rst=%b ref=%b", tag, state, hold, phase_en, dco_rst, ref_clk);
    end
  endtask

  initial begin
    #300 rst_n = 1'b1;
    repeat (5) begin
      @(posedge ref_clk); #10 expect_out(2'b00, "idle high");
      @(negedge ref_clk); #10 expect_out(2'b00, "idle low");
    end
    @(negedge ref_clk); #100 set = 1'b1;
    @(posedge ref_clk); #10 expect_out(2'b01, "01 ref high");
    @(negedge ref_clk); #10 expect_out(2'b01, "01 ref low");
    @(posedge ref_clk); #10 expect_out(2'b10, "10 high");
    @(negedge ref_clk); #10 expect_out(2'b10, "10 low");
    @(posedge ref_clk); #10 expect_out(2'b11, "11");
    repeat (6) begin
      @(posedge ref_clk); #10 expect_out(2'b11, "stopped high");
      @(negedge ref_clk); #10 expect_out(2'b11, "stopped low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
