// bmu: branch metric unit for three 3-bit soft symbols.
//
// For each of the eight possible code words c = {c0,c1,c2} the unit forms
// bm[c] = (c0 ? -r0 : +r0) + (c1 ? -r1 : +r1) + (c2 ? -r2 : +r2), an
// add/subtract combination of the received soft symbols r0..r2 (r0 belongs to
// the first code bit i1). A matching symbol (positive for a 1, negative for a
// 0) contributes a negative term, so the best code word has the smallest
// metric, -9 for three full-confidence symbols. Results are 8-bit two's
// complement. Purely combinational.
//
// The eight add/subtract patterns, the 3-bit inputs and 8-bit outputs follow
// the branch metric unit figure; which symbol the leftmost sign belongs to is
// this design's reading.
module bmu
  import vit_pkg::*;
(
  input  soft_t r_i  [RATE_N],
  output bm_t   bm_o [NUM_CW]
);

  always_comb begin
    for (int c = 0; c < NUM_CW; c++) begin
      bm_t acc;
      acc = '0;
      for (int j = 0; j < RATE_N; j++) begin
        if ((cw_t'(c) & cw_t'(1 << (RATE_N - 1 - j))) != '0) acc = acc - bm_t'(r_i[j]);
        else                                         acc = acc + bm_t'(r_i[j]);
      end
      bm_o[c] = acc;
    end
  end

endmodule
