// tb_edge_detector: places the DCO rising edge at random offsets from the
// reference rising edge (within +/-300 ps) and checks the decision:
// behind when the reference edge came first, ahead otherwise.
module tb_edge_detector;
  timeunit 1ps; timeprecision 1fs;

  logic dco_clk = 1'b0, rst_n = 1'b1, ref_clk = 1'b0;
  logic ahead, behind;
  int checks = 0, failures = 0;

  edge_detector dut (.*);

  initial #1 rst_n = 1'b0;   // reset edge for the asynchronous reset

  initial begin
    #100000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100 rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      int off;
      off = int'($urandom_range(1, 300));
      if (k % 2) off = -off;       // negative: DCO edge first
      #400;
      if (off > 0) begin ref_clk = 1'b1; #(off); dco_clk = 1'b1; end
      else         begin dco_clk = 1'b1; #(-off); ref_clk = 1'b1; end
      #50;
      checks++;
      if (behind !== (off > 0) || ahead !== (off < 0)) begin
        failures++; $display("FAIL: offset %0d behind=%b ahead=%b", off, behind, ahead);
      end
      #300; ref_clk = 1'b0; dco_clk = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
