// tb_integer_counter: counts reference transitions in the testbench and
// compares with the sampled count.
// The reference toggles at random times; DCO edges come every 1430 ps and
// the buffered DCO clock 20 ps later. With sel low the output must equal
// the number of transitions before the DCO edge (register 1); with sel high
// it must equal the number before the buffered edge (register 2). A case
// with a reference edge placed between the two clock edges checks that the
// two registers then differ by one and that sel picks between them.
module tb_integer_counter;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic ref_clk = 1'b0, dco_clk = 1'b0, dco_clk_dly = 1'b0, rst_n = 1'b1, sel = 1'b0;
  ncnt_t cnt;
  int checks = 0, failures = 0;
  int n_trans = 0, at_dco = 0, at_dly = 0;

  integer_counter dut (.*);

  initial #1 rst_n = 1'b0;   // reset edge for the asynchronous reset

  initial begin
    #100000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(ref_clk) if (rst_n) n_trans++;

  task automatic dco_edge(input int ref_offset);
    // ref_offset >= 0: toggle reference this many ps after the DCO edge
    dco_clk = 1'b1; at_dco = n_trans;
    if (ref_offset >= 0 && ref_offset < 20) begin
      #(ref_offset); ref_clk = !ref_clk; #(20 - ref_offset);
    end else #20;
    dco_clk_dly = 1'b1; at_dly = n_trans;
    #300; dco_clk = 1'b0; dco_clk_dly = 1'b0;
  endtask

  initial begin
    #100 rst_n = 1'b1;
    n_trans = 0;
    for (int n = 0; n < 200; n++) begin
      int k;
      // a random number of reference transitions between DCO edges
      k = int'($urandom_range(0, 5));
      repeat (k) begin #50; ref_clk = !ref_clk; end
      #400;
      sel = 1'($urandom_range(0, 1));
      dco_edge((n % 4 == 0) ? int'($urandom_range(1, 15)) : -1);
      #10;
      checks++;
      if (cnt !== ncnt_t'(sel ? at_dly : at_dco)) begin
        failures++;
        $display("FAIL: n=%0d sel=%b cnt=%0d expected %0d", n, sel, cnt, sel ? at_dly : at_dco);
      end
      if (n % 4 == 0) begin
        checks++;
        if (dut.reg2 !== dut.reg1 + 1'b1) begin failures++; $display("FAIL: registers do not differ by one"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
