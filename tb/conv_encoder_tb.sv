// conv_encoder_tb: self-checking test of the K = 9, rate 1/3 encoder.
//
// Checks the shift register content after the input 0,1,1,0,1 against the
// register pattern 1,0,1,1,0,0,0,0 (FF1..FF8), then runs random bits with
// random enables and clears and compares every code word and register state
// with a bit-level model kept in the testbench.
module conv_encoder_tb;
  import vit_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, en = 0, din = 0;
  cw_t code;
  logic [7:0] state;
  int checks = 0, failures = 0;
  logic [7:0] model;   // model[0] = FF1

  conv_encoder dut (.clk(clk), .rst_n(rst_n), .clear_i(clear), .en_i(en),
                    .bit_i(din), .code_o(code), .state_o(state));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_code(input string what);
    logic [2:0] exp;
    exp[2] = din ^ model[1];
    exp[1] = din ^ model[0] ^ model[1];
    exp[0] = din ^ model[0] ^ model[1];
    checks++;
    if (code !== exp) begin
      failures++;
      $display("%s: code %b expected %b (bit %b reg %b)", what, code, exp, din, model);
    end
  endtask

  initial begin
    logic [4:0] x;
    model = '0;
    @(negedge clk); rst_n = 1;
    // Example input 0,1,1,0,1 (first bit first)
    x = 5'b01101;
    en = 1;
    for (int i = 4; i >= 0; i--) begin
      din = x[i];
      #1 check_code("example");
      @(negedge clk);
      model = {model[6:0], x[i]};
    end
    en = 0;
    checks++;
    if (state !== 8'b0000_1101) begin
      failures++;
      $display("example: register %b expected FF1..FF8 = 10110000", state);
    end
    // Random stream
    for (int i = 0; i < 1000; i++) begin
      din   = 1'($urandom);
      en    = ($urandom % 8) != 0;
      clear = ($urandom % 50) == 0;
      #1;
      if (!clear) check_code("random");
      @(negedge clk);
      if (clear)   model = '0;
      else if (en) model = {model[6:0], din};
      checks++;
      if (state !== model) begin
        failures++;
        $display("random: register %b expected %b", state, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
