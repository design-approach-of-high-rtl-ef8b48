// conv_encoder: rate 1/3, constraint length 9 convolutional encoder.
//
// An 8-stage shift register (FF1..FF8) holds the eight previous input bits
// b1..b8; the current input bit is b0. Each enabled clock the input bit is
// shifted into FF1 and every stage moves one place on (FF1 -> FF2 -> ...).
// The three code bits are XOR combinations of the window given by the
// generator masks in vit_pkg (i1 = b0^b2, i2 = i3 = b0^b1^b2). They are
// combinational from bit_i and the register, so code_o belongs to the bit
// presented in the same cycle.
//
// Interface: en_i shifts bit_i in at the clock edge; clear_i empties the
// register (the all-zero start state) and has priority over en_i. state_o
// shows FF1..FF8 with FF1 (b1 after the edge) in bit 0.
//
// The structure and taps follow the encoder figure. The synchronous clear and
// the active-low asynchronous reset are this design's own choices.
module conv_encoder
  import vit_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear_i,
  input  logic               en_i,
  input  logic               bit_i,
  output cw_t                code_o,
  output logic [SR_BITS-1:0] state_o
);

  logic [SR_BITS-1:0] ff_q;   // ff_q[0] = FF1 = b1, ff_q[7] = FF8 = b8

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ff_q <= '0;
    else if (clear_i) ff_q <= '0;
    else if (en_i)    ff_q <= {ff_q[SR_BITS-2:0], bit_i};
  end

  assign code_o  = encode_window({ff_q, bit_i});
  assign state_o = ff_q;

endmodule
