// adpll_pkg: widths and reset values shared by the ADPLL blocks.
//
// The DCO is steered by a 12-bit word made of a 6-bit coarse word and a
// 6-bit fine word (both read as unsigned binary, 0..63, as the control-word
// plots of the design show them). The fractional TDC produces 7-bit words
// T1/T2: bits 6:3 are the number (counted from 1) of the 8-tap delay block
// holding a transition, bits 2:0 the position of the transition inside
// that block. The integer counter is 4 bits wide. The algorithm output dT is
// a signed period error in TDC steps; DT_W is chosen so that the largest
// product (N-2)*(T2-T1) cannot overflow.
package adpll_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned CW_W      = 6;   // coarse word width
  localparam int unsigned FW_W      = 6;   // fine word width
  localparam int unsigned TDC_W     = 7;   // T1/T2 word width
  localparam int unsigned NCNT_W    = 4;   // integer (transition) counter width
  localparam int unsigned DT_W      = 13;  // signed period-error width

  localparam int unsigned TDC_BLOCKS    = 16; // delay blocks in the chain
  localparam int unsigned TDC_BLOCK_LEN = 8;  // buffers per delay block
  localparam int unsigned TDC_TAPS      = TDC_BLOCKS * TDC_BLOCK_LEN;

  localparam logic [CW_W-1:0] COARSE_INIT = 6'd32; // starting coarse word
  localparam logic [FW_W-1:0] FINE_INIT   = 6'd32; // fine word at rest

  typedef logic [CW_W-1:0]         coarse_t;
  typedef logic [FW_W-1:0]         fine_t;
  typedef logic [TDC_W-1:0]        tdc_word_t;
  typedef logic [NCNT_W-1:0]       ncnt_t;
  typedef logic signed [DT_W-1:0]  dt_t;

  // State of the control unit's 2-bit reference-clocked counter.
  typedef enum logic [1:0] {
    CTL_FREQ  = 2'b00,  // frequency acquisition
    CTL_RESET = 2'b01,  // DCO held while Ref is low, released on Ref rising
    CTL_PHASE = 2'b10,  // phase acquisition running
    CTL_DONE  = 2'b11   // counter stopped
  } ctl_state_e;
endpackage
