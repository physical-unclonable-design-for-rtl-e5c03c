// tb_shift_rows -- ShiftRows / InvShiftRows: the byte mapping of the example
// (row r rotated left by r), random states against the reference, and the
// inverse undoing the forward shift.
module tb_shift_rows;
  timeunit 1ns;
  timeprecision 1ps;
  import aes_ref_pkg::*;

  logic [127:0] din, dout;
  logic inverse;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  shift_rows dut (.state_in(din), .inverse(inverse), .state_out(dout));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] fwd;
    // Byte (r,c) holds the value 8'h<r><c>. After ShiftRows row 1 reads
    // s11 s12 s13 s10, row 2 s22 s23 s20 s21, row 3 s33 s30 s31 s32.
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) din[127 - 8 * (4 * c + r) -: 8] = 8'(16 * r + c);
    inverse = 0; #1;
    check(dout, 128'h00_11_22_33_01_12_23_30_02_13_20_31_03_10_21_32, "example forward");
    inverse = 1; #1;
    check(dout, 128'h00_13_22_31_01_10_23_32_02_11_20_33_03_12_21_30, "example inverse");
    for (int n = 0; n < 100; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      inverse = 0; #1; fwd = dout;
      check(fwd, ref_shift_rows(din, 0), "random forward");
      din = fwd; inverse = 1; #1;
      check(dout, ref_shift_rows(fwd, 1), "random inverse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
