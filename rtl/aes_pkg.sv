// aes_pkg -- types, constants and constant tables shared by the AES datapath.
//
// The state is a 128-bit vector holding the 4x4 byte matrix column by column:
// byte 0 (bits 127:120) is s(0,0), byte 1 is s(1,0), byte 4 is s(0,1) and so
// on, which is the usual AES byte order of plaintext, key and ciphertext.
//
// Galois-field arithmetic is done with two 256-entry tables, as in the
// original description of the design:
//   E (exponent) table: E[i] = 03^i in GF(2^8), i = 0..255 (E[255] = E[0] = 01)
//   L (logarithm) table: L[E[i]] = i, so L[a] is the power of 03 giving a.
// A product a*b (a, b nonzero) is E[L[a] + L[b]], where a sum above FF has FF
// taken off. The S-box and its inverse are not typed in: they are derived here
// at elaboration time from the same tables (multiplicative inverse
// E[255 - L[a]] followed by the AES affine transform), which is this design's
// choice; the resulting tables are the standard AES S-boxes.
package aes_pkg;

  timeunit 1ns;
  timeprecision 1ps;

  // Number of rounds for a 128-bit key.
  localparam int unsigned NR = 10;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  // A 256-entry byte table; entry i is tbl[i].
  typedef logic [255:0][7:0] byte_table_t;

  // Multiplication by 02 (only used to build the E table).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_table_t gen_e_table();
    byte_table_t t;
    byte_t       v;
    v = 8'h01;
    for (int i = 0; i < 256; i++) begin
      t[i] = v;
      v    = v ^ xtime(v);          // v * 03
    end
    return t;
  endfunction

  function automatic byte_table_t gen_l_table();
    byte_table_t e;
    byte_table_t t;
    e = gen_e_table();
    t = '0;                          // L[0] is undefined; kept at 00
    for (int i = 0; i < 255; i++) t[e[i]] = byte_t'(i);
    return t;
  endfunction

  localparam byte_table_t E_TABLE = gen_e_table();
  localparam byte_table_t L_TABLE = gen_l_table();

  function automatic byte_t rotl8(byte_t a, int unsigned n);
    return byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic byte_table_t gen_sbox();
    byte_table_t e;
    byte_table_t l;
    byte_table_t t;
    byte_t       inv;
    e = gen_e_table();
    l = gen_l_table();
    for (int i = 0; i < 256; i++) begin
      inv  = (i == 0) ? 8'h00 : e[255 - int'(l[i])];
      t[i] = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
    end
    return t;
  endfunction

  function automatic byte_table_t gen_inv_sbox();
    byte_table_t s;
    byte_table_t t;
    s = gen_sbox();
    t = '0;
    for (int i = 0; i < 256; i++) t[s[i]] = byte_t'(i);
    return t;
  endfunction

  localparam byte_table_t SBOX     = gen_sbox();
  localparam byte_table_t INV_SBOX = gen_inv_sbox();

  // Byte (r, c) of a column-major state.
  function automatic byte_t get_byte(block_t s, int unsigned r, int unsigned c);
    return s[127 - 8 * (4 * c + r) -: 8];
  endfunction

endpackage
