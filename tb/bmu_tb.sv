// bmu_tb: exhaustive test of the branch metric unit over all 7^3 soft
// inputs in -3..3. The expected metrics come from the printed sign patterns
// of the eight adders (+++ for code word 000 ... --- for 111).
module bmu_tb;
  import vit_pkg::*;

  soft_t r  [3];
  bm_t   bm [8];
  int checks = 0, failures = 0;
  string signs [8] = '{"+++", "++-", "+-+", "+--", "-++", "-+-", "--+", "---"};

  bmu dut (.r_i(r), .bm_o(bm));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -3; a <= 3; a++)
      for (int b = -3; b <= 3; b++)
        for (int c = -3; c <= 3; c++) begin
          int v [3];
          v = '{a, b, c};
          r[0] = soft_t'(a); r[1] = soft_t'(b); r[2] = soft_t'(c);
          #1;
          for (int w = 0; w < 8; w++) begin
            int exp;
            exp = 0;
            for (int j = 0; j < 3; j++) exp += (signs[w][j] == "+") ? v[j] : -v[j];
            checks++;
            if (int'(bm[w]) != exp) begin
              failures++;
              $display("r=(%0d,%0d,%0d) bm[%0d]=%0d expected %0d", a, b, c, w, bm[w], exp);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
