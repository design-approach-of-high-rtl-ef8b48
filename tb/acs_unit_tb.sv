// acs_unit_tb: random test of one add-compare-select unit: sums, choice of
// the smaller sum (branch 0 on a tie), handling of unreachable
// predecessors and the decision bit.
module acs_unit_tb;
  import vit_pkg::*;

  pm_t  pm0, pm1, pm;
  bm_t  bm0, bm1;
  logic v0, v1, dec, v;
  int checks = 0, failures = 0;
  int ties = 0;

  acs_unit dut (.pm0_i(pm0), .pm1_i(pm1), .valid0_i(v0), .valid1_i(v1),
                .bm0_i(bm0), .bm1_i(bm1), .pm_o(pm), .dec_o(dec), .valid_o(v));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5000; k++) begin
      int a, b, x, y, s0, s1, exp_pm, exp_dec;
      a = int'($urandom % 201) - 100;
      b = (k % 10 == 0) ? a : int'($urandom % 201) - 100;
      x = int'($urandom % 19) - 9;
      y = (k % 10 == 0) ? x : int'($urandom % 19) - 9;
      pm0 = pm_t'(a); pm1 = pm_t'(b); bm0 = bm_t'(x); bm1 = bm_t'(y);
      v0 = ($urandom % 6) != 0; v1 = ($urandom % 6) != 0;
      #1;
      s0 = a + x; s1 = b + y;
      if (!v0)          exp_dec = 1;
      else if (!v1)     exp_dec = 0;
      else              exp_dec = (s1 < s0) ? 1 : 0;
      if (v0 && v1 && s0 == s1) ties++;
      exp_pm = (exp_dec != 0) ? s1 : s0;
      checks++;
      if (int'(pm) != exp_pm || int'(dec) != exp_dec || v != (v0 | v1)) begin
        failures++;
        $display("pm %0d/%0d bm %0d/%0d v %b%b: got pm %0d dec %b v %b, expected %0d %0d",
                 a, b, x, y, v0, v1, pm, dec, v, exp_pm, exp_dec);
      end
    end
    checks++;
    if (ties == 0) begin failures++; $display("no tie exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
