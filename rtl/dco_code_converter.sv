// dco_code_converter: turns the 12-bit binary DCO control word into the
// switch lines of the ring oscillator's delay cells.
//
// The word is handled in 2-bit groups, each converted on its own, which keeps
// the converter small:
//   coarse[1:0] -> a_th[2:0]  thermometer lines of coarse cell 1
//   coarse[3:2] -> b_th[2:0]  thermometer lines of coarse cell 2
//   coarse[5:4] -> fix_sel    binary select of the fixed-delay-chain mux
//   fine[5:0]   -> d_th[8:0]  fine cell lines D(0)..D(8), three groups of 3
// A 2-bit group g becomes 3 thermometer lines (00->000, 01->001, 10->011,
// 11->111). Group weights follow from the binary word: inside the oscillator
// each line of a higher group switches 4x the delay of a line one group
// lower. The grouping into 2-bit pieces and the thermometer form follow the
// design; the exact line counts per coarse cell are this design's choice.
// Purely combinational.
module dco_code_converter
  import adpll_pkg::*;
(
  input  coarse_t     coarse,
  input  fine_t       fine,
  output logic [2:0]  a_th,
  output logic [2:0]  b_th,
  output logic [1:0]  fix_sel,
  output logic [8:0]  d_th
);
  timeunit 1ps; timeprecision 1fs;

  function automatic logic [2:0] therm2(input logic [1:0] v);
    unique case (v)
      2'd0:    return 3'b000;
      2'd1:    return 3'b001;
      2'd2:    return 3'b011;
      default: return 3'b111;
    endcase
  endfunction

  always_comb begin
    a_th    = therm2(coarse[1:0]);
    b_th    = therm2(coarse[3:2]);
    fix_sel = coarse[5:4];
    d_th    = {therm2(fine[5:4]), therm2(fine[3:2]), therm2(fine[1:0])};
  end
endmodule
