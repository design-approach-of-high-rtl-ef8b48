// viterbi_decoder_tb: checks the parallel pipelined decoder against an
// exhaustive maximum likelihood search.
//
// Frames of soft symbols (clean, lightly disturbed or with hard bit errors)
// are sent in bursts with one frame per clock and with gaps. For every frame
// the testbench checks: the output appears N+1 cycles after the input, each
// state's final metric equals the best metric over all 4096 frames ending in
// that state, each survivor ends in its state and really has that metric,
// the best state is the least-metric one, and clean frames decode to the
// sent data. It also runs the 12-bit example frame 001100111110, which must
// come out in state 3 with metric -108, and counts frames whose hard bit
// errors were corrected and cycles with several frames in the pipeline.
module viterbi_decoder_tb;
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

  logic clk = 0, rst_n = 0, vin = 0, vout;
  soft_t soft_s [N][3];
  pm_t metric [8];
  logic [N-1:0] surv [8];
  state_t best;
  logic [N-1:0] decoded;
  int checks = 0, failures = 0;
  int cycle = 0, outs = 0, corrected = 0, overlap = 0, in_flight = 0;
  exp_t q [$];

  viterbi_decoder #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .valid_i(vin), .soft_i(soft_s),
                                .valid_o(vout), .metric_o(metric), .survivor_o(surv),
                                .best_state_o(best), .decoded_o(decoded));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (vin && !vout && in_flight > 0) overlap++;
    in_flight <= in_flight + int'(vin) - int'(vout);
    if (vout) begin
      exp_t e;
      e = q.pop_front();
      outs++;
      checks++;
      if (cycle - e.t_in != N + 1) begin
        failures++; $display("latency %0d, expected %0d", cycle - e.t_in, N + 1);
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
      end
      if (e.hard_err && decoded == e.frame) corrected++;
      if (e.frame == 12'b001100111110 && e.clean) begin
        checks++;
        if (best != 3'd3 || metric[3] != -8'sd108) begin
          failures++; $display("example frame: best %0d metric %0d", best, metric[3]);
        end
      end
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
      int v;
      v = code[i] ? 3 : -3;
      if (mode == 1) v += int'($urandom % 5) - 2;
      if (mode == 2 && ($urandom % 12) == 0) v = -v;
      if (v > 3) v = 3;
      if (v < -3) v = -3;
      if ((v > 0) != (code[i] != 0)) e.hard_err = 1;
      e.r[i] = v;
      soft_s[i/3][i%3] = soft_t'(v);
    end
    ref_search(e.r, e.best_m, e.best_s);
    e.t_in = cycle;
    q.push_back(e);
    vin = 1;
    @(negedge clk);
    vin = 0;
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    send(12'b001100111110, 0);
    for (int k = 0; k < 240; k++) begin
      send(N'($urandom), k % 3);
      if ($urandom % 4 == 0) repeat ($urandom % 5) @(negedge clk);
    end
    repeat (N + 4) @(negedge clk);
    checks++;
    if (outs != 241) begin failures++; $display("%0d frames out of 241", outs); end
    checks++;
    if (corrected == 0) begin failures++; $display("no hard error was corrected"); end
    checks++;
    if (overlap == 0) begin failures++; $display("pipeline never held two frames"); end
    $display("corrected frames with hard errors: %0d, cycles with overlapping frames: %0d",
             corrected, overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
