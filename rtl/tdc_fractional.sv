// tdc_fractional: fractional part of the time-to-digital converter.
//
// The 128 taps of the reference-clock delay line (16 blocks of 8 buffers)
// are sampled by 128 flip-flops on the rising DCO edge. Decoder 1 finds, at
// block resolution, where the sampled pattern first changes 0->1 and 1->0;
// one Decoder 2 per block finds the position inside each block; the selector
// picks the Decoder 2 results of the two blocks Decoder 1 named. The outputs
// are
//   t1 = {block number (from 1), position}  of the first 0->1 change
//   t2 = {block number (from 1), position}  of the first 1->0 change
// in TDC steps (one buffer delay). Because every block number carries the
// same +1, differences of these words are exact tap distances. The
// algorithm unit orders t1/t2 itself. first_blk_edge is the XOR of the first
// block's end taps: high when a reference edge lies inside delay block 1,
// i.e. just before the DCO edge; it selects register 2 of the integer
// counter.
//
// Timing: taps sampled at posedge clk; all outputs are combinational from
// the sample flops and valid one clock-to-q after that edge. The split into
// a block decoder and an in-block decoder and the 7-bit word layout follow
// the design; treating the first tap of block 1 as the reference for block 1
// is this design's choice.
module tdc_fractional
  import adpll_pkg::*;
(
  input  logic                clk,    // DCO clock
  input  logic                rst_n,
  input  logic [TDC_TAPS-1:0] taps,
  output tdc_word_t           t1,
  output tdc_word_t           t2,
  output logic                t1_found,
  output logic                t2_found,
  output logic                first_blk_edge
);
  timeunit 1ps; timeprecision 1fs;

  logic [TDC_TAPS-1:0]   q;
  logic [TDC_BLOCKS-1:0] blk_out;
  logic [2:0]            pos [TDC_BLOCKS];
  logic [3:0]            rise_blk, fall_blk, rise_idx, fall_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= taps;
  end

  for (genvar k = 0; k < TDC_BLOCKS; k++) begin : g_blk
    assign blk_out[k] = q[k*TDC_BLOCK_LEN + TDC_BLOCK_LEN - 1];
    tdc_decoder2 u_dec2 (
      .blk  (q[k*TDC_BLOCK_LEN +: TDC_BLOCK_LEN]),
      .prev ((k == 0) ? q[0] : q[k*TDC_BLOCK_LEN - 1]),
      .pos  (pos[k])
    );
  end

  tdc_decoder1 u_dec1 (
    .blk_out    (blk_out),
    .first_tap  (q[0]),
    .rise_blk   (rise_blk),
    .fall_blk   (fall_blk),
    .rise_idx   (rise_idx),
    .fall_idx   (fall_idx),
    .rise_found (t1_found),
    .fall_found (t2_found)
  );

  // Selector
  assign t1 = {rise_blk, pos[rise_idx]};
  assign t2 = {fall_blk, pos[fall_idx]};

  assign first_blk_edge = q[0] ^ q[TDC_BLOCK_LEN-1];
endmodule
