// viterbi_decoder: parallel processed Viterbi decoder with pipelining for
// frames of N data bits (N*3 soft symbols) of the K = 9, rate 1/3 code.
//
// The trellis of a frame is unrolled into N acs_stage instances, one per
// step, each holding a BMU and all eight ACS units (parallel processing over
// the states) and ending in a register (pipelining over the steps). Frame
// metrics start at 0 in state 0, the encoder's start state, with every other
// state marked unreachable. After the last step smu_traceback traces all
// eight survivors back and picks the least-metric state; the results are
// registered.
//
// Interface: valid_i with soft_i[t][j] = soft symbol j (j = 0 for i1) of data
// bit t (t = 0 first). One frame may be presented every clock. N+1 cycles
// later valid_o rises with metric_o[s] (final path metric of state s),
// survivor_o[s], best_state_o and decoded_o (first data bit in the MSB).
//
// Metric range: a step changes a metric by at most 9, so for N = 12 every
// metric stays within -108..108 and 8 bits need no renormalisation. A
// longer frame needs PM_W raised in vit_pkg.
//
// BMU, ACS, path metric memory, survivor memory and least-metric output
// follow the document; unrolling one register stage per trellis step is this
// design's reading of its pipelining scheme.
module viterbi_decoder
  import vit_pkg::*;
#(
  parameter int N = FRAME_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  valid_i,
  input  soft_t                 soft_i       [N][RATE_N],
  output logic                  valid_o,
  output pm_t                   metric_o     [NUM_STATES],
  output logic [N-1:0]          survivor_o   [NUM_STATES],
  output state_t                best_state_o,
  output logic [N-1:0]          decoded_o
);

  // The metrics must not wrap: each step moves a metric by at most
  // RATE_N * SOFT_MAX.
  if (N * RATE_N * SOFT_MAX > (1 << (PM_W - 1)) - 1) begin : g_pm_too_narrow
    $error("PM_W too small for a frame of %0d bits", N);
  end

  // Pipeline buses: index k is the input of stage k, index N the last output.
  logic                  p_valid [N+1];
  pm_t                   p_pm    [N+1][NUM_STATES];
  logic [NUM_STATES-1:0] p_reach [N+1];
  soft_t                 p_soft  [N+1][N][RATE_N];
  logic [NUM_STATES-1:0] p_dec   [N+1][N];

  assign p_valid[0] = valid_i;
  assign p_reach[0] = NUM_STATES'(1);
  assign p_soft[0]  = soft_i;
  always_comb begin
    for (int s = 0; s < NUM_STATES; s++) p_pm[0][s] = '0;
    for (int t = 0; t < N; t++)          p_dec[0][t] = '0;
  end

  for (genvar k = 0; k < N; k++) begin : g_stage
    acs_stage #(.N(N), .STAGE(k)) u_stage (
      .clk     (clk),
      .rst_n   (rst_n),
      .valid_i (p_valid[k]),
      .pm_i    (p_pm[k]),
      .reach_i (p_reach[k]),
      .soft_i  (p_soft[k]),
      .dec_i   (p_dec[k]),
      .valid_o (p_valid[k+1]),
      .pm_o    (p_pm[k+1]),
      .reach_o (p_reach[k+1]),
      .soft_o  (p_soft[k+1]),
      .dec_o   (p_dec[k+1])
    );
  end

  logic [N-1:0] surv     [NUM_STATES];
  state_t       best;
  logic [N-1:0] decoded;

  smu_traceback #(.N(N)) u_smu (
    .dec_i     (p_dec[N]),
    .pm_i      (p_pm[N]),
    .reach_i   (p_reach[N]),
    .surv_o    (surv),
    .best_o    (best),
    .decoded_o (decoded)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_o <= 1'b0;
    else        valid_o <= p_valid[N];
  end

  always_ff @(posedge clk) begin
    if (p_valid[N]) begin
      metric_o     <= p_pm[N];
      survivor_o   <= surv;
      best_state_o <= best;
      decoded_o    <= decoded;
    end
  end

endmodule
