// smu_traceback_tb: checks the trace-back survivor memory with random
// decisions and metrics. Each survivor is checked for consistency instead of
// being traced again: it must end in its own state, and for every step t >= 3
// the stored decision of the state {x[t],x[t-1],x[t-2]} must equal x[t-3].
// The best state is checked against a linear minimum search.
module smu_traceback_tb;
  import vit_pkg::*;

  localparam int N = 12;

  logic [7:0]   dec [N];
  pm_t          pm  [8];
  logic [7:0]   reach;
  logic [N-1:0] surv [8];
  state_t       best;
  logic [N-1:0] decoded;
  int checks = 0, failures = 0;

  smu_traceback #(.N(N)) dut (.dec_i(dec), .pm_i(pm), .reach_i(reach),
                              .surv_o(surv), .best_o(best), .decoded_o(decoded));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int eb, bm;
      for (int t = 0; t < N; t++) dec[t] = 8'($urandom);
      for (int s = 0; s < 8; s++) pm[s] = pm_t'(int'($urandom % 21) - 10);
      reach = (k % 3 == 0) ? 8'hff : 8'($urandom) | 8'h80;
      #1;
      for (int f = 0; f < 8; f++) begin
        bit x [N];
        for (int t = 0; t < N; t++) x[t] = surv[f][N-1-t];
        checks++;
        if ({x[N-1], x[N-2], x[N-3]} != 3'(f)) begin
          failures++; $display("survivor %0d = %b does not end in its state", f, surv[f]);
        end
        for (int t = 3; t < N; t++) begin
          int st;
          st = int'({x[t], x[t-1], x[t-2]});
          checks++;
          if (dec[t][st] != x[t-3]) begin
            failures++;
            $display("survivor %0d = %b breaks decision at step %0d", f, surv[f], t);
          end
        end
      end
      eb = -1; bm = 0;
      for (int s = 0; s < 8; s++)
        if (reach[s] && (eb < 0 || int'(pm[s]) < bm)) begin eb = s; bm = int'(pm[s]); end
      checks++;
      if (int'(best) != eb || decoded != surv[eb]) begin
        failures++; $display("best %0d expected %0d", best, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
