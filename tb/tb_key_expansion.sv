// tb_key_expansion -- key schedule against the FIPS-197 appendix A.1 key
// (round key 10 = d014f9a8 c9ee2589 e13f0cc8 b6630ca6) and random keys against
// the reference schedule; checks that ready comes NR + 1 cycles after load.
module tb_key_expansion;
  timeunit 1ns;
  timeprecision 1ps;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 1, load = 0, ready;
  logic [127:0] key = '0, round_key;
  logic [3:0] rk_idx = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  key_expansion dut (.clk(clk), .rst_n(rst_n), .load(load), .key(key), .ready(ready),
                     .rk_idx(rk_idx), .round_key(round_key));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] k);
    rk_t exp;
    int cycles;
    exp = expand(k);
    @(negedge clk); key = k; load = 1;
    @(negedge clk); load = 0;
    cycles = 1;
    while (!ready) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 11) begin failures++; $display("FAIL latency %0d", cycles); end
    for (int r = 0; r <= 10; r++) begin
      rk_idx = 4'(r); #1;
      checks++;
      if (round_key !== exp[r]) begin
        failures++; $display("FAIL key %h round %0d: %h expected %h", k, r, round_key, exp[r]);
      end
    end
  endtask

  initial begin
    #1 rst_n = 0;   // an explicit edge starts the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    rk_idx = 4'd10; #1; checks++;
    if (round_key !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++; $display("FAIL FIPS-197 round key 10: %h", round_key);
    end
    for (int n = 0; n < 20; n++) run({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
