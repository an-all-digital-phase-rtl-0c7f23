// tb_tdc_decoder2: exhaustive test of the in-block decoder.
// For every 8-bit block and both previous values, the expected position is
// the index of the first tap that differs from the previous value, or 0
// when no tap differs; every block with a single change must decode to the
// tap where the change happens. Includes the design's examples
// (00111111 after 0 -> 2, 11111000 after 1 -> 5).
module tb_tdc_decoder2;
  timeunit 1ps; timeprecision 1fs;

  logic [7:0] blk; logic prev; logic [2:0] pos;
  int checks = 0, failures = 0;

  tdc_decoder2 dut (.*);

  initial begin
    #10000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // examples (bit 0 = tap nearest the chain input, written left to right)
    blk = 8'b1111_1100; prev = 1'b0; #1;
    checks++; if (pos != 3'd2) begin failures++; $display("FAIL: example 1 gave %0d", pos); end
    blk = 8'b0001_1111; prev = 1'b1; #1;
    checks++; if (pos != 3'd5) begin failures++; $display("FAIL: example 2 gave %0d", pos); end
    for (int p = 0; p < 2; p++) begin
      for (int v = 0; v < 256; v++) begin
        int e;
        blk = 8'(v); prev = 1'(p); #1;
        e = 0;
        for (int i = 7; i >= 0; i--) if (blk[i] != prev) e = i;
        checks++;
        if (int'(pos) != e) begin failures++; $display("FAIL: blk=%b prev=%b pos=%0d exp %0d", blk, prev, pos, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
