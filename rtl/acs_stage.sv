// acs_stage: one trellis step of the pipelined Viterbi decoder.
//
// The stage decodes step STAGE of a frame. Its own bmu turns the three soft
// symbols of that step into eight branch metrics, and eight acs_unit
// instances update all state metrics at once (parallel processing). State
// s = {b0,b1,b2} is entered from the predecessors {s[1:0],0} and {s[1:0],1};
// both branches carry the code word of s, so both adders use the same branch
// metric. The new metrics, the reachability bits and the eight decision bits
// are registered at the end of the stage: that register is the path metric
// memory of the step and the pipeline register at once. The frame's soft
// symbols and the decisions of earlier steps travel along with the metrics,
// so one frame can enter the pipeline every clock.
//
// Timing: one cycle. Outputs are registered and change only when valid_i is
// high; valid_o is valid_i delayed by one cycle.
//
// The BMU/ACS structure follows the document. Folding the path metric memory
// into a pipeline register per trellis step is this design's reading of the
// parallel processing with pipelining scheme.
module acs_stage
  import vit_pkg::*;
#(
  parameter int N     = FRAME_BITS,
  parameter int STAGE = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  valid_i,
  input  pm_t                   pm_i    [NUM_STATES],
  input  logic [NUM_STATES-1:0] reach_i,
  input  soft_t                 soft_i  [N][RATE_N],
  input  logic [NUM_STATES-1:0] dec_i   [N],
  output logic                  valid_o,
  output pm_t                   pm_o    [NUM_STATES],
  output logic [NUM_STATES-1:0] reach_o,
  output soft_t                 soft_o  [N][RATE_N],
  output logic [NUM_STATES-1:0] dec_o   [N]
);

  bm_t                   bm      [NUM_CW];
  pm_t                   pm_new  [NUM_STATES];
  logic [NUM_STATES-1:0] dec_new;
  logic [NUM_STATES-1:0] reach_new;

  bmu u_bmu (
    .r_i  (soft_i[STAGE]),
    .bm_o (bm)
  );

  for (genvar s = 0; s < NUM_STATES; s++) begin : g_acs
    localparam state_t P0 = state_t'((s << 1) & (NUM_STATES - 1));
    localparam state_t P1 = state_t'(((s << 1) | 1) & (NUM_STATES - 1));
    localparam cw_t    CW = state_codeword(state_t'(s));

    acs_unit u_acs (
      .pm0_i    (pm_i[P0]),
      .pm1_i    (pm_i[P1]),
      .valid0_i (reach_i[P0]),
      .valid1_i (reach_i[P1]),
      .bm0_i    (bm[CW]),
      .bm1_i    (bm[CW]),
      .pm_o     (pm_new[s]),
      .dec_o    (dec_new[s]),
      .valid_o  (reach_new[s])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_o <= 1'b0;
    else        valid_o <= valid_i;
  end

  always_ff @(posedge clk) begin
    if (valid_i) begin
      pm_o    <= pm_new;
      reach_o <= reach_new;
      soft_o  <= soft_i;
      for (int t = 0; t < N; t++)
        dec_o[t] <= (t == STAGE) ? dec_new : dec_i[t];
    end
  end

endmodule
