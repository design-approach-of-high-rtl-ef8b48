// acs_stage_tb: checks one pipelined trellis step (instantiated as step 5)
// against a forward trellis model: every predecessor p and input bit u give
// the successor {u,p[2:1]} and the code word of (u,p[2],p[1]); the smallest
// candidate wins. Also checks the pass-through of soft symbols and earlier
// decisions, the one-cycle latency and that the stage holds when idle.
module acs_stage_tb;
  import vit_pkg::*;

  localparam int N = 12;
  localparam int ST = 5;

  logic clk = 0, rst_n = 0, vin = 0, vout;
  pm_t  pm_i [8], pm_o [8];
  logic [7:0] reach_i, reach_o;
  soft_t soft_i [N][3], soft_o [N][3];
  logic [7:0] dec_i [N], dec_o [N];
  int checks = 0, failures = 0;

  acs_stage #(.N(N), .STAGE(ST)) dut (
    .clk(clk), .rst_n(rst_n), .valid_i(vin), .pm_i(pm_i), .reach_i(reach_i),
    .soft_i(soft_i), .dec_i(dec_i), .valid_o(vout), .pm_o(pm_o),
    .reach_o(reach_o), .soft_o(soft_o), .dec_o(dec_o));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int epm [8], edec [8], ereach [8];
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      for (int s = 0; s < 8; s++) pm_i[s] = pm_t'(int'($urandom % 201) - 100);
      reach_i = (k % 4 == 0) ? 8'h01 : 8'($urandom);
      for (int t = 0; t < N; t++) begin
        dec_i[t] = 8'($urandom);
        for (int j = 0; j < 3; j++) soft_i[t][j] = soft_t'(int'($urandom % 7) - 3);
      end
      // reference
      for (int s = 0; s < 8; s++) begin epm[s] = 1 << 30; edec[s] = 0; ereach[s] = 0; end
      for (int p = 0; p < 8; p++) begin
        for (int u = 0; u < 2; u++) begin
          int s, c1, c2, bmv, r0, r1, r2;
          s  = (u << 2) | (p >> 1);
          c1 = u ^ ((p >> 1) & 1);
          c2 = u ^ ((p >> 2) & 1) ^ ((p >> 1) & 1);
          r0 = int'(soft_i[ST][0]); r1 = int'(soft_i[ST][1]); r2 = int'(soft_i[ST][2]);
          bmv = ((c1 != 0) ? -r0 : r0) + ((c2 != 0) ? -r1 : r1) + ((c2 != 0) ? -r2 : r2);
          if (reach_i[p] && int'(pm_i[p]) + bmv < epm[s]) begin
            epm[s] = int'(pm_i[p]) + bmv;
            edec[s] = p & 1;
            ereach[s] = 1;
          end
        end
      end
      vin = 1;
      @(negedge clk);
      vin = ($urandom % 3) == 0;
      checks++;
      if (!vout) begin failures++; $display("valid_o low one cycle after valid_i"); end
      for (int s = 0; s < 8; s++) begin
        checks++;
        if (reach_o[s] != 1'(ereach[s]) ||
            (ereach[s] != 0 && (int'(pm_o[s]) != epm[s] || dec_o[ST][s] != 1'(edec[s])))) begin
          failures++;
          $display("state %0d: pm %0d dec %b reach %b, expected %0d %0d %0d", s,
                   pm_o[s], dec_o[ST][s], reach_o[s], epm[s], edec[s], ereach[s]);
        end
      end
      for (int t = 0; t < N; t++) begin
        checks++;
        if ((t != ST && dec_o[t] != dec_i[t]) || soft_o[t] != soft_i[t]) begin
          failures++;
          $display("pass-through of step %0d wrong", t);
        end
      end
      if (!vin) begin
        // idle cycle: the stage must keep its contents
        for (int s = 0; s < 8; s++) pm_i[s] = pm_t'(int'($urandom % 201) - 100);
        @(negedge clk);
        checks++;
        if (vout) begin failures++; $display("valid_o high after idle input"); end
        for (int s = 0; s < 8; s++) begin
          checks++;
          if (ereach[s] != 0 && int'(pm_o[s]) != epm[s]) begin
            failures++; $display("state %0d metric changed while idle", s);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
