// vit_codec_top: convolutional encoder, channel soft mapping and parallel
// pipelined Viterbi decoder for frames of N data bits.
//
// A frame X (frame_i, first bit in the MSB) is taken when frame_valid_i is
// high and ready_o is high, together with one noise value per code symbol.
// frame_encoder encodes it bit-serially into N*3 code bits Y, soft_mapper
// turns them into 3-bit soft symbols R (+3 for a 1, -3 for a 0, plus the
// noise, clipped to -3..3) and viterbi_decoder produces the estimate Z:
// decoded_o, the final metric of all eight states, their survivor sequences
// and the least-metric state.
//
// Timing: with N = 12 a frame is accepted every N+1 = 13 cycles (the serial
// encoder is the bottleneck). valid_o rises 2N+2 = 26 cycles after the
// clock edge that accepts the frame: N+1 cycles to encode and N+1 to decode.
// Consecutive frames overlap in the decoder pipeline.
//
// The chain X -> encoder -> channel -> decoder and the per-state metric and
// output ports follow the document; the noise input in place of a real
// channel and the ready/valid handshake are this design's choices.
module vit_codec_top
  import vit_pkg::*;
#(
  parameter int N = FRAME_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 frame_valid_i,
  input  logic [N-1:0]         frame_i,
  input  logic signed [3:0]    noise_i      [N][RATE_N],
  output logic                 ready_o,
  output logic [N*RATE_N-1:0]  clipped_o,
  output logic                 valid_o,
  output pm_t                  metric_o     [NUM_STATES],
  output logic [N-1:0]         survivor_o   [NUM_STATES],
  output state_t               best_state_o,
  output logic [N-1:0]         decoded_o
);

  logic              start;
  logic              enc_busy;
  logic              enc_done;
  cw_t               code [N];
  logic signed [3:0] noise_q [N][RATE_N];
  soft_t             soft_sym [N][RATE_N];

  assign ready_o = !enc_busy;
  assign start   = frame_valid_i && ready_o;

  always_ff @(posedge clk) begin
    if (start) noise_q <= noise_i;
  end

  frame_encoder #(.N(N)) u_enc (
    .clk     (clk),
    .rst_n   (rst_n),
    .start_i (start),
    .frame_i (frame_i),
    .busy_o  (enc_busy),
    .done_o  (enc_done),
    .code_o  (code)
  );

  soft_mapper #(.N(N)) u_map (
    .code_i  (code),
    .noise_i (noise_q),
    .soft_o  (soft_sym),
    .sat_o   (clipped_o)
  );

  viterbi_decoder #(.N(N)) u_dec (
    .clk          (clk),
    .rst_n        (rst_n),
    .valid_i      (enc_done),
    .soft_i       (soft_sym),
    .valid_o      (valid_o),
    .metric_o     (metric_o),
    .survivor_o   (survivor_o),
    .best_state_o (best_state_o),
    .decoded_o    (decoded_o)
  );

endmodule
