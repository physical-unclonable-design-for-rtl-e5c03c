// tb_gf_mul -- exhaustive check of the L/E-table GF(2^8) multiplier: all
// 65536 operand pairs against shift-and-add multiplication, plus the products
// by 02 and 03 that MixColumns uses.
module tb_gf_mul;
  timeunit 1ns;
  timeprecision 1ps;
  import aes_ref_pkg::*;

  logic [7:0] a, b, p;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  gf_mul dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (p !== gmul(a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL %h*%h = %h, expected %h", a, b, p, gmul(a, b));
        end
      end
    // Known values: 57*83 = c1 (FIPS-197 4.2), 57*13 = fe.
    a = 8'h57; b = 8'h83; #1; checks++; if (p !== 8'hc1) failures++;
    a = 8'h57; b = 8'h13; #1; checks++; if (p !== 8'hfe) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
