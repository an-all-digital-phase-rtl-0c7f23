// integer_counter: integer part of the TDC, the count N of reference-clock
// transitions (rising and falling) per DCO period.
//
// A free-running 4-bit count of reference transitions (the sum of a
// rising-edge and a falling-edge counter, modulo 16) is sampled twice:
// register 1 on the DCO clock, register 2 on the DCO clock delayed by one
// buffer. A reference edge just before the DCO edge can miss register 1's
// setup window but is caught by register 2. The mux passes register 2 when
// sel is high (sel = the XOR of the fractional TDC's first delay block, i.e.
// a reference edge lies just before the DCO edge) and register 1 otherwise,
// where register 2 might already hold the next edge.
//
// Output cnt is the sampled count; N for one DCO period is the difference of
// two successive samples (taken in algorithm_unit). Two registers, the
// buffered clock and the XOR-driven mux follow the design; building the
// transition count from two edge counters and sampling a free-running count
// (instead of clearing it each period) are this design's choices.
// Asynchronous active-low reset clears everything.
module integer_counter
  import adpll_pkg::*;
(
  input  logic  ref_clk,      // reference clock (as seen at the TDC chain input)
  input  logic  dco_clk,      // clock of register 1
  input  logic  dco_clk_dly,  // buffered DCO clock, clock of register 2
  input  logic  rst_n,
  input  logic  sel,          // 1: use register 2
  output ncnt_t cnt
);
  timeunit 1ps; timeprecision 1fs;

  ncnt_t rise_cnt, fall_cnt, trans_cnt, reg1, reg2;

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) rise_cnt <= '0;
    else        rise_cnt <= rise_cnt + 1'b1;
  end

  always_ff @(negedge ref_clk or negedge rst_n) begin
    if (!rst_n) fall_cnt <= '0;
    else        fall_cnt <= fall_cnt + 1'b1;
  end

  assign trans_cnt = rise_cnt + fall_cnt;

  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) reg1 <= '0;
    else        reg1 <= trans_cnt;
  end

  always_ff @(posedge dco_clk_dly or negedge rst_n) begin
    if (!rst_n) reg2 <= '0;
    else        reg2 <= trans_cnt;
  end

  assign cnt = sel ? reg2 : reg1;
endmodule
