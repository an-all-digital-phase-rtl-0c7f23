// tdc_delay_line: behavioural model of the TDC's buffer chain (analog timing,
// not synthesizable logic).
//
// The reference clock runs through TDC_BLOCKS delay blocks of TDC_BLOCK_LEN
// buffers each (16 x 8 = 128 buffers). Tap i is the output of buffer i+1, so
// it shows the reference clock as it was (i+1)*TAU_PS ago. The buffer delay,
// 20 ps, is the TDC resolution the design states. Each buffer is modelled
// on its own, so every input pulse longer than one buffer delay reaches
// every tap. The flip-flops that sample the taps at the DCO edge are in
// tdc_fractional.
//
// Ports: ref_in, the reference clock; taps[TDC_TAPS-1:0], tap 0 nearest the
// input.
module tdc_delay_line
  import adpll_pkg::*;
#(
  parameter real TAU_PS = 20.0
) (
  input  logic                ref_in,
  output logic [TDC_TAPS-1:0] taps
);
  timeunit 1ps; timeprecision 1fs;

  for (genvar i = 0; i < TDC_TAPS; i++) begin : g_buf
    initial taps[i] = 1'b0;
    if (i == 0) begin : g_first
      always @(ref_in) taps[i] <= #(TAU_PS) ref_in;
    end else begin : g_next
      always @(taps[i-1]) taps[i] <= #(TAU_PS) taps[i-1];
    end
  end
endmodule
