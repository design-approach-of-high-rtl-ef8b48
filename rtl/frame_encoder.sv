// frame_encoder: encodes one frame of FRAME_BITS data bits into
// FRAME_BITS*3 code bits with the bit-serial conv_encoder.
//
// A frame is loaded in parallel (start_i with frame_i) while the unit is idle.
// The load cycle also clears the encoder register, so every frame starts in
// the all-zero state. The frame is then shifted out MSB first, one bit per
// clock, into conv_encoder, and each bit's three code bits are stored in
// code_o[t], t = 0 for the first (most significant) bit. After the last bit
// done_o pulses for one cycle and code_o holds the whole frame until the
// next load.
//
// Timing: start_i in cycle 0, bits encoded in cycles 1..FRAME_BITS, done_o
// high in cycle FRAME_BITS+1; busy_o is high from cycle 1 to cycle FRAME_BITS
// and a new start_i is taken from cycle FRAME_BITS+1 on. A new frame thus
// every FRAME_BITS+1 cycles.
//
// The 12-bit frame and its 36 code bits follow the simulation example; the
// parallel load, MSB-first order and per-frame clear are this design's
// choices.
module frame_encoder
  import vit_pkg::*;
#(
  parameter int N = FRAME_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic [N-1:0] frame_i,
  output logic         busy_o,
  output logic         done_o,
  output cw_t          code_o [N]
);

  localparam int CW = $clog2(N + 1);

  logic [N-1:0]  data_q;
  logic [CW-1:0] cnt_q;
  logic          run_q;
  logic          enc_clear;
  logic          enc_bit;
  cw_t           enc_code;
  logic [SR_BITS-1:0] enc_state;

  assign enc_clear = start_i && !run_q;
  assign enc_bit   = data_q[N-1];

  conv_encoder u_enc (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear_i (enc_clear),
    .en_i    (run_q),
    .bit_i   (enc_bit),
    .code_o  (enc_code),
    .state_o (enc_state)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q <= '0;
      cnt_q  <= '0;
      run_q  <= 1'b0;
      done_o <= 1'b0;
      for (int t = 0; t < N; t++) code_o[t] <= '0;
    end else begin
      done_o <= 1'b0;
      if (!run_q) begin
        if (start_i) begin
          data_q <= frame_i;
          cnt_q  <= '0;
          run_q  <= 1'b1;
        end
      end else begin
        code_o[cnt_q] <= enc_code;
        data_q        <= data_q << 1;
        if (cnt_q == CW'(N - 1)) begin
          run_q  <= 1'b0;
          done_o <= 1'b1;
        end
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  assign busy_o = run_q;

  // Every frame must start from the all-zero encoder register.
  always_ff @(posedge clk) begin
    if (run_q && cnt_q == '0)
      assert (enc_state == '0) else $error("frame did not start in the zero state");
  end

endmodule
