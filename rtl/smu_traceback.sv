// smu_traceback: survivor memory unit with trace-back.
//
// The decisions of all N trellis steps of a frame arrive together (dec_i[t]
// holds the eight decision bits of step t). For every final state the unit
// walks the trellis backwards: at step t the current state s = {b0,b1,b2}
// gives the decoded bit b0 = s[2], and the previous state is the state number
// shifted left by one with the stored decision bit shifted in,
// {s[1:0], dec_i[t][s]}. The eight traces run side by side, so surv_o[s] is
// the survivor sequence that ends in state s (first bit in the MSB, last bit
// in the LSB). The state with the smallest final metric (lowest number on a
// tie, unreachable states excluded) is the maximum likelihood end state;
// its survivor is decoded_o. Purely combinational.
//
// The left-shift trace-back and the choice of the least metric follow the
// document; tracing all eight end states in parallel, and not only one, is
// this design's choice, made so that all eight survivors are visible as in
// the decoder's simulation figure.
module smu_traceback
  import vit_pkg::*;
#(
  parameter int N = FRAME_BITS
) (
  input  logic [NUM_STATES-1:0] dec_i   [N],
  input  pm_t                   pm_i    [NUM_STATES],
  input  logic [NUM_STATES-1:0] reach_i,
  output logic [N-1:0]          surv_o  [NUM_STATES],
  output state_t                best_o,
  output logic [N-1:0]          decoded_o
);

  always_comb begin
    for (int f = 0; f < NUM_STATES; f++) begin
      state_t s;
      s = state_t'(f);
      surv_o[f] = '0;
      for (int t = N - 1; t >= 0; t--) begin
        surv_o[f][N-1-t] = s[STATE_BITS-1];
        s = {s[STATE_BITS-2:0], dec_i[t][s]};
      end
    end
  end

  always_comb begin
    pm_t  best_pm;
    logic found;
    best_o  = '0;
    best_pm = '0;
    found   = 1'b0;
    for (int f = 0; f < NUM_STATES; f++) begin
      if (reach_i[f] && (!found || pm_i[f] < best_pm)) begin
        best_o  = state_t'(f);
        best_pm = pm_i[f];
        found   = 1'b1;
      end
    end
  end

  assign decoded_o = surv_o[best_o];

endmodule
