// tdc_decoder1: block-level decoder of the fractional TDC ("Decoder 1").
//
// It looks only at the last tap of each of the 16 delay blocks (the block
// outputs) and finds the first block, counted from the chain input, whose
// output differs from the one before it: separately for a 0->1 change
// (rise) and a 1->0 change (fall). Block 1 is compared with the chain's first
// tap. The results are block numbers counted from 1, as in the design's
// decoding example (transition in the 2nd block -> 0010), in 4 bits; a
// change found only in block 16 would read as 0000, which needs a
// reference half-period above 2.4 ns and lies outside the design's range.
// Combinational.
module tdc_decoder1
  import adpll_pkg::*;
(
  input  logic [TDC_BLOCKS-1:0] blk_out,   // last tap of each block
  input  logic                  first_tap, // chain's first sampled tap
  output logic [3:0]            rise_blk,  // 1-based block number of first 0->1
  output logic [3:0]            fall_blk,  // 1-based block number of first 1->0
  output logic [3:0]            rise_idx,  // same, 0-based (selector control)
  output logic [3:0]            fall_idx,
  output logic                  rise_found,
  output logic                  fall_found
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    logic p;
    rise_idx = '0; fall_idx = '0;
    rise_found = 1'b0; fall_found = 1'b0;
    for (int k = 0; k < TDC_BLOCKS; k++) begin
      p = (k == 0) ? first_tap : blk_out[k-1];
      if (!rise_found && !p && blk_out[k]) begin
        rise_found = 1'b1; rise_idx = 4'(k);
      end
      if (!fall_found && p && !blk_out[k]) begin
        fall_found = 1'b1; fall_idx = 4'(k);
      end
    end
    rise_blk = rise_idx + 4'd1;
    fall_blk = fall_idx + 4'd1;
  end
endmodule
