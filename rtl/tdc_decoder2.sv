// tdc_decoder2: in-block decoder of the fractional TDC ("Decoder 2").
//
// One instance per delay block. It receives the block's 8 sampled taps and
// the sampled output of the block before it (for block 1, its own first tap)
// and returns, as a 3-bit number, how many leading taps of the block still
// equal that earlier value, i.e. the position of the transition inside the
// block. Examples: previous 0, block 00111111 -> 2; previous 1, block
// 11111000 -> 5. A change at the block's first tap and no change at all
// both give 0; the block decoder tells them apart. The
// thermometer-to-binary reading follows the
// decoding example of the design; taking the previous block's output as the
// reference value is this design's choice. Combinational.
module tdc_decoder2
  import adpll_pkg::*;
(
  input  logic [TDC_BLOCK_LEN-1:0] blk,   // bit 0 = tap nearest the chain input
  input  logic                     prev,  // sampled value just before the block
  output logic [2:0]               pos
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    pos = 3'd0;
    for (int i = TDC_BLOCK_LEN - 1; i >= 0; i--) begin
      if (blk[i] != prev) pos = 3'(i);
    end
  end
endmodule
