// tb_delay_buffer: checks that each input edge reaches the output exactly
// 20 ps later.
module tb_delay_buffer;
  timeunit 1ps; timeprecision 1fs;
  logic a = 1'b0, y;
  int checks = 0, failures = 0;
  realtime ta;

  delay_buffer dut (.*);

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50;
    for (int i = 0; i < 8; i++) begin
      a = !a; ta = $realtime;
      #19.9;
      checks++; if (y === a) begin failures++; $display("FAIL: output too early"); end
      #0.2;
      checks++; if (y !== a) begin failures++; $display("FAIL: output late"); end
      #(100 + 13 * i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
