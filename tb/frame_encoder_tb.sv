// frame_encoder_tb: self-checking test of the frame encoder.
//
// Sends random 12-bit frames, some back to back and some with idle gaps and
// with start requests while busy, and checks the 36 code bits against the
// reference encoder, the done pulse FRAME_BITS+1 cycles after the accepted
// start, and that busy blocks a new start.
module frame_encoder_tb;
  import vit_pkg::*;
  import vit_ref_pkg::*;

  localparam int N = 12;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] frame = '0;
  logic busy, done;
  cw_t code [N];
  int checks = 0, failures = 0;
  int cycle = 0;

  frame_encoder #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .start_i(start),
                              .frame_i(frame), .busy_o(busy), .done_o(done),
                              .code_o(code));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] f;
    bit exp [3*N];
    int t0;
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      f = N'($urandom);
      if (k == 0) f = 12'b001100111110;
      frame = f; start = 1;
      @(posedge clk); t0 = cycle;
      @(negedge clk);
      // start requests while busy must be ignored
      frame = ~f;
      start = ($urandom % 2) == 0;
      checks++;
      if (!busy) begin failures++; $display("busy low after start"); end
      while (!done) @(negedge clk);
      start = 0;
      checks++;
      if (cycle - t0 != N + 1) begin
        failures++;
        $display("done %0d cycles after start, expected %0d", cycle - t0, N + 1);
      end
      ref_encode(f, exp);
      for (int t = 0; t < N; t++) begin
        checks++;
        if (code[t] !== {exp[3*t], exp[3*t+1], exp[3*t+2]}) begin
          failures++;
          $display("frame %h bit %0d: code %b expected %b%b%b", f, t, code[t],
                   exp[3*t], exp[3*t+1], exp[3*t+2]);
        end
      end
      if (($urandom % 2) != 0) repeat ($urandom % 4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
