// edge_detector: bang-bang phase detector between the reference and DCO
// rising edges.
//
// A flip-flop clocked by the DCO's rising edge samples the reference clock.
// If Ref is already high, its rising edge came first and the DCO is
// behind; if Ref is still low the DCO is ahead. This is valid while the two
// edges are less than half a reference period apart, which the frequency
// acquisition and the DCO restart ensure. The design gives only the
// ahead/behind function; the single sampling flip-flop is this design's
// choice. Outputs are registered; asynchronous active-low reset.
module edge_detector (
  input  logic dco_clk,
  input  logic rst_n,
  input  logic ref_clk,
  output logic ahead,
  output logic behind
);
  timeunit 1ps; timeprecision 1fs;

  logic ref_s;

  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) ref_s <= 1'b0;
    else        ref_s <= ref_clk;
  end

  assign behind = ref_s;
  assign ahead  = !ref_s;
endmodule
