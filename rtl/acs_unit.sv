// acs_unit: add-compare-select for one trellis state.
//
// Two adders form the candidate metrics pm0+bm0 and pm1+bm1 of the two
// branches that enter the state, a comparator compares them and a selector
// keeps the smaller one as the new path metric. dec_o names the chosen branch
// (0 or 1); it is the bit passed on to the survivor memory. Ties go to
// branch 0. A predecessor whose valid bit is low (not yet reachable from the
// start state) is never chosen; valid_o is low only if neither is valid.
// Purely combinational.
//
// Two adders, comparator, selector and "keep the smaller" follow the
// document; the valid bits and the tie rule are this design's choices.
module acs_unit
  import vit_pkg::*;
(
  input  pm_t  pm0_i,
  input  pm_t  pm1_i,
  input  logic valid0_i,
  input  logic valid1_i,
  input  bm_t  bm0_i,
  input  bm_t  bm1_i,
  output pm_t  pm_o,
  output logic dec_o,
  output logic valid_o
);

  pm_t  sum0, sum1;
  logic pick1;

  assign sum0 = pm0_i + pm_t'(bm0_i);
  assign sum1 = pm1_i + pm_t'(bm1_i);

  always_comb begin
    if (!valid0_i)      pick1 = 1'b1;
    else if (!valid1_i) pick1 = 1'b0;
    else                pick1 = (sum1 < sum0);
  end

  assign pm_o    = pick1 ? sum1 : sum0;
  assign dec_o   = pick1;
  assign valid_o = valid0_i | valid1_i;

endmodule
