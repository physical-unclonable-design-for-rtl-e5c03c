// tb_mix_columns -- MixColumns / InvMixColumns: the worked 4x4 example
// (87 F2 4D 97 / 6E 4C 90 EC / 46 E7 4A C3 / A6 8C D8 95 becomes
// 47 40 A3 4C / 37 D4 70 9F / 94 E4 3A 42 / ED A5 A6 BC), its inverse, and
// random states against the reference model.
module tb_mix_columns;
  timeunit 1ns;
  timeprecision 1ps;
  import aes_ref_pkg::*;

  logic [127:0] din, dout;
  logic inverse;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mix_columns dut (.state_in(din), .inverse(inverse), .state_out(dout));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // The example written column by column.
  localparam logic [127:0] EX_IN  = 128'h876e46a6_f24ce78c_4d904ad8_97ecc395;
  localparam logic [127:0] EX_OUT = 128'h473794ed_40d4e4a5_a3703aa6_4c9f42bc;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] fwd;
    din = EX_IN;  inverse = 0; #1; check(dout, EX_OUT, "worked example");
    din = EX_OUT; inverse = 1; #1; check(dout, EX_IN,  "worked example inverse");
    for (int n = 0; n < 100; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      inverse = 0; #1; fwd = dout;
      check(fwd, ref_mix_columns(din, 0), "random forward");
      din = fwd; inverse = 1; #1;
      check(dout, ref_mix_columns(fwd, 1), "random inverse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
