// soft_mapper_tb: checks the bit to soft symbol mapping, the noise addition
// and the clipping to -3..3 over random code words and noise values.
module soft_mapper_tb;
  import vit_pkg::*;

  localparam int N = 12;

  cw_t               code  [N];
  logic signed [3:0] noise [N][3];
  soft_t             soft_s  [N][3];
  logic [3*N-1:0]    sat;
  int checks = 0, failures = 0;

  soft_mapper #(.N(N)) dut (.code_i(code), .noise_i(noise), .soft_o(soft_s), .sat_o(sat));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 300; k++) begin
      for (int t = 0; t < N; t++) begin
        code[t] = 3'($urandom);
        for (int j = 0; j < 3; j++) noise[t][j] = (k == 0) ? 4'sd0 : 4'($urandom);
      end
      #1;
      for (int t = 0; t < N; t++) begin
        for (int j = 0; j < 3; j++) begin
          int ideal, v, clip;
          ideal = code[t][2-j] ? 3 : -3;
          v = ideal + int'(noise[t][j]);
          clip = 0;
          if (v > 3)  begin v = 3;  clip = 1; end
          if (v < -3) begin v = -3; clip = 1; end
          checks++;
          if (int'(soft_s[t][j]) != v || sat[3*t+j] != 1'(clip)) begin
            failures++;
            $display("sym %0d/%0d bit %b noise %0d: got %0d clip %b, expected %0d clip %0d",
                     t, j, code[t][2-j], noise[t][j], soft_s[t][j], sat[3*t+j], v, clip);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
