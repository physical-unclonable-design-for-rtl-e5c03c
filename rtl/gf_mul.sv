// gf_mul -- multiplier in GF(2^8) built from the L (logarithm) and E
// (exponent) tables, the way the original design describes MixColumns
// arithmetic.
//
// How it works: both operands are looked up in the L table and the two
// logarithms are added. A sum above FF has FF subtracted, and the result is
// looked up in the E table (E[FF] = E[00] = 01, so a sum of exactly FF needs no
// correction). A zero operand has no logarithm; the product is then 00. The
// zero check is this design's addition: the description does not mention it.
//
// Interface: a, b in, p = a * b out (AES polynomial x^8+x^4+x^3+x+1).
// Timing: purely combinational.
module gf_mul
  import aes_pkg::*;
(
  input  byte_t a,
  input  byte_t b,
  output byte_t p
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [8:0] log_sum;
  logic [7:0] log_mod;

  always_comb begin
    log_sum = {1'b0, L_TABLE[a]} + {1'b0, L_TABLE[b]};
    log_mod = (log_sum > 9'h0ff) ? 8'(log_sum - 9'h0ff) : log_sum[7:0];
    if (a == 8'h00 || b == 8'h00) p = 8'h00;
    else                          p = E_TABLE[log_mod];
  end

endmodule
