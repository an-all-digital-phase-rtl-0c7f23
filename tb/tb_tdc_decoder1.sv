// tb_tdc_decoder1: block-level decoder against a reference search.
// Random 16-bit block-output words and first-tap values; the expected
// results are the first block k (from 0) whose output is 1 after a 0 (rise)
// or 0 after a 1 (fall), block 0 being compared with the first tap, and
// block numbers k+1. Includes the design's example 011110 -> 0010 / 0110.
module tb_tdc_decoder1;
  timeunit 1ps; timeprecision 1fs;

  logic [15:0] blk_out; logic first_tap;
  logic [3:0] rise_blk, fall_blk, rise_idx, fall_idx;
  logic rise_found, fall_found;
  int checks = 0, failures = 0;

  tdc_decoder1 dut (.*);

  initial begin
    #10000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int er, ef; logic p;
    er = -1; ef = -1;
    for (int k = 0; k < 16; k++) begin
      p = (k == 0) ? first_tap : blk_out[k-1];
      if (er < 0 && !p && blk_out[k]) er = k;
      if (ef < 0 && p && !blk_out[k]) ef = k;
    end
    #1;
    checks++;
    if (rise_found != (er >= 0) || fall_found != (ef >= 0) ||
        (er >= 0 && (int'(rise_idx) != er || rise_blk != 4'(er + 1))) ||
        (ef >= 0 && (int'(fall_idx) != ef || fall_blk != 4'(ef + 1)))) begin
      failures++;
      $display("FAIL: blk_out=%b first=%b -> rise %0d/%b fall %0d/%b (exp %0d %0d)",
               blk_out, first_tap, rise_idx, rise_found, fall_idx, fall_found, er, ef);
    end
  endtask

  initial begin
    // example: blocks 1..6 give 0 1 1 1 1 0, the rest 1
    blk_out = 16'b1111_1111_1101_1110; first_tap = 1'b0;
    check_one();
    checks++;
    if (rise_blk != 4'b0010 || fall_blk != 4'b0110) begin failures++; $display("FAIL: example"); end
    for (int n = 0; n < 2000; n++) begin
      blk_out = 16'($urandom); first_tap = 1'($urandom_range(0, 1));
      if (n % 5 == 0) blk_out = '0;
      if (n % 7 == 0) blk_out = '1;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
