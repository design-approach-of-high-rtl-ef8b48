// vit_ref_pkg: reference models for the Viterbi codec testbenches.
//
// They are written without the design's package: the encoder is a plain
// bit-by-bit shift register with the taps i1 = b0^b2, i2 = i3 = b0^b1^b2,
// and the decoder reference is an exhaustive maximum likelihood search over
// all 2^12 frames, which gives the best metric of every end state directly
// instead of through the add-compare-select recursion.
package vit_ref_pkg;

  localparam int RN = 12;   // frame length of the reference

  // Code bits of a frame (bit t = frame[RN-1-t] is sent first):
  // code[3t] = i1, code[3t+1] = i2, code[3t+2] = i3.
  function automatic void ref_encode(input logic [RN-1:0] frame,
                                     output bit code [3*RN]);
    bit b0, b1, b2;
    b1 = 0; b2 = 0;
    for (int t = 0; t < RN; t++) begin
      b0 = frame[RN-1-t];
      code[3*t]   = b0 ^ b2;
      code[3*t+1] = b0 ^ b1 ^ b2;
      code[3*t+2] = b0 ^ b1 ^ b2;
      b2 = b1; b1 = b0;
    end
  endfunction

  // Correlation metric of a frame hypothesis against soft symbols r.
  function automatic int ref_metric(input logic [RN-1:0] frame, input int r [3*RN]);
    bit code [3*RN];
    int m;
    ref_encode(frame, code);
    m = 0;
    for (int i = 0; i < 3*RN; i++) m += code[i] ? -r[i] : r[i];
    return m;
  endfunction

  // End state {b0,b1,b2} of a frame: its last three bits, newest as MSB.
  function automatic int ref_end_state(input logic [RN-1:0] frame);
    return int'({frame[0], frame[1], frame[2]});
  endfunction

  // Best metric of each end state over all frames, and the overall best
  // state (smallest metric, lowest state number on a tie).
  function automatic void ref_search(input int r [3*RN], output int best_m [8],
                                     output int best_s);
    for (int s = 0; s < 8; s++) best_m[s] = 1 << 30;
    for (int f = 0; f < (1 << RN); f++) begin
      int m, s;
      m = ref_metric(RN'(f), r);
      s = ref_end_state(RN'(f));
      if (m < best_m[s]) best_m[s] = m;
    end
    best_s = 0;
    for (int s = 1; s < 8; s++) if (best_m[s] < best_m[best_s]) best_s = s;
  endfunction

endpackage
