// vit_codec_top_tb: end-to-end test of encoder, channel mapping and decoder
// at the default frame size (12 data bits, 36 code bits), with the top's
// parameters untouched.
//
// Frames are offered back to back through the ready/valid handshake, each
// with a noise pattern: none, small offsets, or offsets that flip single
// code bits or clip symbols. Every result is checked against the exhaustive
// maximum likelihood reference (per-state metrics, survivors, best state),
// clean frames must decode to the sent data and the example frame
// 001100111110 must end in state 3. The testbench counts how often each
// mechanism occurred and fails if one never did: serial encoding of a frame
// (frame accepted), handshake back-pressure (frame_valid while not ready),
// symbol clipping, correction of a hard bit error, and two frames in flight
// at once. It also checks the 2N+2 cycle latency from acceptance to result.
module vit_codec_top_tb;
  import vit_pkg::*;
  import vit_ref_pkg::*;

  localparam int N = 12;

  typedef struct {
    logic [N-1:0] frame;
    int           r [3*N];
    int           best_m [8];
    int           best_s;
    int           t_in;
    bit           clean;
    bit           hard_err;
  } exp_t;

  logic clk = 0, rst_n = 0, fvalid = 0, ready, vout;
  logic [N-1:0] frame = '0;
  logic signed [3:0] noise [N][3];
  logic [3*N-1:0] clipped;
  pm_t metric [8];
  logic [N-1:0] surv [8];
  state_t best;
  logic [N-1:0] decoded;
  int checks = 0, failures = 0;
  int cycle = 0, outs = 0;
  int n_accept = 0, n_stall = 0, n_clip = 0, n_corrected = 0, n_overlap = 0;
  int in_flight = 0;
  exp_t q [$];

  vit_codec_top dut (.clk(clk), .rst_n(rst_n), .frame_valid_i(fvalid), .frame_i(frame),
                     .noise_i(noise), .ready_o(ready), .clipped_o(clipped), .valid_o(vout),
                     .metric_o(metric), .survivor_o(surv), .best_state_o(best),
                     .decoded_o(decoded));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (fvalid && !ready) n_stall++;
    if (fvalid && ready) begin
      if (in_flight > 0) n_overlap++;
    end
    in_flight <= in_flight + int'(fvalid && ready) - int'(vout);
    if (|clipped && dut.u_enc.done_o) n_clip++;
    if (vout) begin
      exp_t e;
      e = q.pop_front();
      outs++;
      checks++;
      if (cycle - e.t_in != 2 * N + 2) begin
        failures++; $display("latency %0d, expected %0d", cycle - e.t_in, 2 * N + 2);
      end
      for (int s = 0; s < 8; s++) begin
        checks++;
        if (int'(metric[s]) != e.best_m[s] || ref_end_state(surv[s]) != s ||
            ref_metric(surv[s], e.r) != e.best_m[s]) begin
          failures++;
          $display("frame %b state %0d: metric %0d surv %b, expected metric %0d",
                   e.frame, s, metric[s], surv[s], e.best_m[s]);
        end
      end
      checks++;
      if (int'(best) != e.best_s || decoded != surv[e.best_s]) begin
        failures++; $display("best %0d expected %0d", best, e.best_s);
      end
      if (e.clean) begin
        checks++;
        if (decoded != e.frame) begin
          failures++; $display("clean frame %b decoded as %b", e.frame, decoded);
        end
        if (e.frame == 12'b001100111110) begin
          checks++;
          if (best != 3'd3) begin failures++; $display("example frame in state %0d", best); end
        end
      end
      if (e.hard_err && decoded == e.frame) n_corrected++;
    end
  end

  task automatic send(input logic [N-1:0] f, input int mode);
    exp_t e;
    bit code [3*N];
    e.frame = f;
    ref_encode(f, code);
    e.clean = (mode == 0);
    e.hard_err = 0;
    for (int i = 0; i < 3*N; i++) begin
      int nz, v;
      nz = 0;
      if (mode == 1) nz = int'($urandom % 5) - 2;
      if (mode == 2 && ($urandom % 12) == 0) nz = code[i] ? -6 : 6;
      if (mode == 3) nz = int'($urandom % 16) - 8;
      noise[i/3][i%3] = 4'(nz);
      v = (code[i] ? 3 : -3) + nz;
      if (v > 3) v = 3;
      if (v < -3) v = -3;
      if ((v > 0) != (code[i] != 0)) e.hard_err = 1;
      e.r[i] = v;
    end
    ref_search(e.r, e.best_m, e.best_s);
    frame = f;
    fvalid = 1;
    @(posedge clk);
    while (!ready) @(posedge clk);
    e.t_in = cycle;
    q.push_back(e);
    n_accept++;
    @(negedge clk);
    fvalid = 0;
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    send(12'b001100111110, 0);
    for (int k = 0; k < 120; k++) send(N'($urandom), (k % 4 == 3) ? 2 : k % 4);
    repeat (2 * N + 6) @(negedge clk);
    checks++;
    if (outs != n_accept) begin failures++; $display("%0d of %0d frames out", outs, n_accept); end
    $display("accepted %0d, stalled %0d, clipped %0d, corrected %0d, overlapped %0d",
             n_accept, n_stall, n_clip, n_corrected, n_overlap);
    checks += 5;
    if (n_accept == 0)    begin failures++; $display("no frame encoded"); end
    if (n_stall == 0)     begin failures++; $display("no back-pressure"); end
    if (n_clip == 0)      begin failures++; $display("no clipping"); end
    if (n_corrected == 0) begin failures++; $display("no hard error corrected"); end
    if (n_overlap == 0)   begin failures++; $display("frames never overlapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
