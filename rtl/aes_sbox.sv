// aes_sbox -- one byte substitution through the AES S-box (forward) or the
// inverse S-box (decryption).
//
// The two 256-entry tables are constants from aes_pkg, derived there from the
// L/E tables. The whole byte indexes the table: its high nibble selects the
// row and its low nibble the column of the usual 16x16 printed S-box.
//
// Interface: din, inverse (1 = inverse S-box), dout. Combinational.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t din,
  input  logic  inverse,
  output byte_t dout
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb dout = inverse ? INV_SBOX[din] : SBOX[din];

endmodule
