// vit_pkg: types, sizes and code definition shared by the convolutional
// encoder and the parallel, pipelined Viterbi decoder.
//
// The code is a rate 1/3 convolutional code of constraint length K = 9: an
// 8-stage shift register b1..b8 behind the current input bit b0. The three
// outputs are i1 = b0^b2, i2 = b0^b1^b2 and i3 = b0^b1^b2 (the encoder
// figure's labels). Because no output taps b3..b8, the decoder trellis only
// has to track b0..b2: eight states, state number s = {b0,b1,b2} with the
// newest bit b0 as the MSB. The previous state is then {s[1:0],d}: a left
// shift of the state number with one decision bit d (= b3) shifted in.
//
// Soft symbols are 3-bit two's complement values in -3..3, positive meaning
// "1". Branch and path metrics are 8-bit two's complement; the smaller path
// metric is the more likely one.
package vit_pkg;

  localparam int K          = 9;           // constraint length
  localparam int SR_BITS    = K - 1;       // shift register stages FF1..FF8
  localparam int RATE_N     = 3;           // code bits per input bit
  localparam int SOFT_W     = 3;           // soft decision width
  localparam int SOFT_MAX   = 3;           // soft symbols span -3..3
  localparam int BM_W       = 8;           // branch metric width
  localparam int PM_W       = 8;           // path metric width
  localparam int FRAME_BITS = 12;          // data bits per frame
  localparam int STATE_BITS = 3;           // tracked bits b0..b2
  localparam int NUM_STATES = 1 << STATE_BITS;
  localparam int NUM_CW     = 1 << RATE_N; // distinct code words

  // Generator masks over the window {b8..b0}; bit i selects b_i.
  localparam logic [K-1:0] GEN1 = 9'b000000101; // i1 = b0 + b2
  localparam logic [K-1:0] GEN2 = 9'b000000111; // i2 = b0 + b1 + b2
  localparam logic [K-1:0] GEN3 = 9'b000000111; // i3 = b0 + b1 + b2

  typedef logic signed [SOFT_W-1:0] soft_t;
  typedef logic signed [BM_W-1:0]   bm_t;
  typedef logic signed [PM_W-1:0]   pm_t;
  typedef logic [STATE_BITS-1:0]    state_t;
  typedef logic [RATE_N-1:0]        cw_t;   // {i1,i2,i3}, i1 is the MSB

  // Code word for the window {b8..b0} (window[0] = current input bit b0).
  function automatic cw_t encode_window(logic [K-1:0] window);
    return {^(window & GEN1), ^(window & GEN2), ^(window & GEN3)};
  endfunction

  // Code word on every branch that enters trellis state s = {b0,b1,b2}.
  function automatic cw_t state_codeword(state_t s);
    logic [K-1:0] w;
    w = '0;
    w[0] = s[2];
    w[1] = s[1];
    w[2] = s[0];
    return encode_window(w);
  endfunction

endpackage
