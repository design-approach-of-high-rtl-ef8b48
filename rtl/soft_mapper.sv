// soft_mapper: turns code bits into 3-bit soft decision symbols, with an
// additive channel disturbance.
//
// Each code bit becomes +SOFT_MAX (bit 1) or -SOFT_MAX (bit 0). A signed
// 4-bit noise value per symbol is added and the sum is saturated to
// -SOFT_MAX..+SOFT_MAX, the range of the decoder's soft inputs. With noise 0
// the symbols are the ideal ones; a noise of magnitude 4 or more moves a
// symbol across zero, i.e. a hard bit error. Purely combinational.
//
// The soft range -3..3 follows the branch metric description; the bit to
// level mapping and the noise input that stands in for the channel are this
// design's choices.
module soft_mapper
  import vit_pkg::*;
#(
  parameter int N = FRAME_BITS
) (
  input  cw_t                code_i  [N],
  input  logic signed [3:0]  noise_i [N][RATE_N],
  output soft_t              soft_o  [N][RATE_N],
  output logic [N*RATE_N-1:0] sat_o          // a symbol was clipped
);

  always_comb begin
    for (int t = 0; t < N; t++) begin
      for (int j = 0; j < RATE_N; j++) begin
        logic signed [5:0] v;
        v = (code_i[t][RATE_N-1-j] ? 6'sd3 : -6'sd3) + 6'(noise_i[t][j]);
        sat_o[t*RATE_N+j] = 1'b0;
        if (v > 6'(SOFT_MAX)) begin
          v = 6'(SOFT_MAX);
          sat_o[t*RATE_N+j] = 1'b1;
        end else if (v < -6'(SOFT_MAX)) begin
          v = -6'(SOFT_MAX);
          sat_o[t*RATE_N+j] = 1'b1;
        end
        soft_o[t][j] = soft_t'(v);
      end
    end
  end

endmodule
