// lock_indicator: declares frequency lock from the algorithm output.
//
// In each update slot with a valid period error, hit is high when
// |dt| <= LOCK_TOL TDC steps. After LOCK_COUNT hits in a row (counted on the
// falling DCO edge, like the other update registers) lock goes high and
// stays high until reset; it starts the control unit and freezes the coarse
// word. A hit also keeps the coarse word unchanged in its own slot, so the
// word that met the tolerance is the one stored. The design names this block
// but does not give its rule; the tolerance test and its defaults (1 TDC
// step, one hit) are this design's choice.
module lock_indicator
  import adpll_pkg::*;
#(
  parameter int unsigned LOCK_TOL   = 1,
  parameter int unsigned LOCK_COUNT = 1
) (
  input  logic clk,     // DCO clock; falling edge
  input  logic rst_n,
  input  logic upd,     // update slot
  input  logic dt_ok,
  input  dt_t  dt,
  output logic hit,
  output logic lock
);
  timeunit 1ps; timeprecision 1fs;

  logic [7:0] hits;

  always_comb begin
    hit = upd && dt_ok && (dt <= $signed(DT_W'(LOCK_TOL))) && (dt >= -$signed(DT_W'(LOCK_TOL)));
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hits <= '0;
      lock <= 1'b0;
    end else if (upd && dt_ok && !lock) begin
      if (hit) begin
        hits <= hits + 1'b1;
        if (32'(hits) + 1 >= LOCK_COUNT) lock <= 1'b1;
      end else begin
        hits <= '0;
      end
    end
  end
endmodule
