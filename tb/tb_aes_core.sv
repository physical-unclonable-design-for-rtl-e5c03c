// tb_aes_core -- AES-128 engine: FIPS-197 appendix B and C.1 vectors, random
// keys and blocks against the reference model in both directions, decryption
// of each ciphertext back to the plaintext, and the 11-cycle block latency.
module tb_aes_core;
  timeunit 1ns;
  timeprecision 1ps;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  logic key_load = 0, key_ready, start = 0, decrypt = 0, busy, dout_valid;
  logic [127:0] key = '0, din = '0, dout;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  aes_core dut (.clk(clk), .rst_n(rst_n), .key_load(key_load), .key(key), .key_ready(key_ready),
                .start(start), .decrypt(decrypt), .din(din), .busy(busy), .dout(dout),
                .dout_valid(dout_valid));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_key(logic [127:0] k);
    @(negedge clk); key = k; key_load = 1;
    @(negedge clk); key_load = 0;
    while (!key_ready) @(negedge clk);
  endtask

  task automatic block(logic dec, logic [127:0] d, output logic [127:0] res);
    int cycles;
    @(negedge clk); din = d; decrypt = dec; start = 1;
    @(negedge clk); start = 0; din = '0;
    cycles = 1;
    while (!dout_valid) begin @(negedge clk); cycles++; end
    res = dout;
    checks++;
    if (cycles != 11) begin failures++; $display("FAIL latency %0d", cycles); end
  endtask

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [127:0] ct, pt, k, p;
    #1 rst_n = 0;   // an explicit edge starts the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    block(0, 128'h3243f6a8885a308d313198a2e0370734, ct);
    check(ct, 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B encrypt");
    block(1, ct, pt);
    check(pt, 128'h3243f6a8885a308d313198a2e0370734, "FIPS-197 B decrypt");
    set_key(128'h000102030405060708090a0b0c0d0e0f);
    block(0, 128'h00112233445566778899aabbccddeeff, ct);
    check(ct, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1 encrypt");
    block(1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, pt);
    check(pt, 128'h00112233445566778899aabbccddeeff, "FIPS-197 C.1 decrypt");
    for (int n = 0; n < 10; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      set_key(k);
      block(0, p, ct);
      check(ct, encrypt(k, p), "random encrypt");
      block(1, ct, pt);
      check(pt, p, "random round trip");
      block(1, p, pt);
      check(pt, aes_ref_pkg::decrypt(k, p), "random decrypt");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
