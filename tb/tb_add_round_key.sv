// tb_add_round_key -- AddRoundKey against a byte-by-byte XOR and the FIPS-197
// first-round example, and applying the same key twice restoring the state.
module tb_add_round_key;
  timeunit 1ns;
  timeprecision 1ps;

  logic [127:0] din, key, dout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  add_round_key dut (.state_in(din), .round_key(key), .state_out(dout));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] exp;
    din = 128'h3243f6a8885a308d313198a2e0370734;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1; checks++;
    if (dout !== 128'h193de3bea0f4e22b9ac68d2ae9f84808) begin
      failures++; $display("FAIL FIPS-197 example: %h", dout);
    end
    for (int n = 0; n < 100; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 16; i++) exp[8 * i +: 8] = din[8 * i +: 8] ^ key[8 * i +: 8];
      #1; checks++;
      if (dout !== exp) begin failures++; $display("FAIL random %h", dout); end
      din = dout; #1; checks++;
      if (dout !== (exp ^ key)) begin failures++; $display("FAIL twice %h", dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
