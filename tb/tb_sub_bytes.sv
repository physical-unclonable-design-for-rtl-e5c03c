// tb_sub_bytes -- SubBytes and InvSubBytes on random states against the
// reference S-box, known S-box entries, and the inverse undoing the forward.
module tb_sub_bytes;
  timeunit 1ns;
  timeprecision 1ps;
  import aes_ref_pkg::*;

  logic [127:0] din, dout;
  logic inverse;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  sub_bytes dut (.state_in(din), .inverse(inverse), .state_out(dout));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] fwd;
    // Every byte value once in each position group, forward and inverse.
    for (int base = 0; base < 256; base += 16) begin
      for (int i = 0; i < 16; i++) din[127 - 8 * i -: 8] = 8'(base + i);
      inverse = 0; #1; check(dout, ref_sub_bytes(din, 0), "sbox sweep");
      inverse = 1; #1; check(dout, ref_sub_bytes(din, 1), "inv sbox sweep");
    end
    // Known entries: S(00)=63, S(53)=ed, S(ff)=16.
    din = {8'h00, 8'h53, 8'hff, {13{8'h00}}};
    inverse = 0; #1;
    check({104'h0, dout[127:104]}, {104'h0, 8'h63, 8'hed, 8'h16}, "known entries");
    for (int n = 0; n < 50; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      inverse = 0; #1; fwd = dout;
      check(fwd, ref_sub_bytes(din, 0), "random forward");
      din = fwd; inverse = 1; #1;
      check(dout, ref_sub_bytes(fwd, 1), "random inverse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
