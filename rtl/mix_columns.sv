// mix_columns -- MixColumns / InvMixColumns on the 4x4 byte state.
//
// Each column (4 bytes) is multiplied by a fixed 4x4 matrix over GF(2^8):
// output byte r of a column is the XOR over c of M[r][c] * s(c). The matrix
// rows are rotations of {02 03 01 01} for encryption and, for decryption
// (inverse = 1), of {0E 0B 0D 09}. Every one of the 64 products is formed by a
// gf_mul, i.e. by the L/E table method; the four columns are done in parallel.
// The inverse matrix is not printed in the original description, only named;
// the standard AES InvMixColumns matrix is used.
//
// Interface: state_in, inverse, state_out (column-major, see aes_pkg).
// Timing: combinational.
module mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  input  logic   inverse,
  output block_t state_out
);
  timeunit 1ns;
  timeprecision 1ps;

  // First matrix row; row r is this row rotated right by r.
  localparam logic [3:0][7:0] FWD_ROW = {8'h02, 8'h03, 8'h01, 8'h01};
  localparam logic [3:0][7:0] INV_ROW = {8'h0e, 8'h0b, 8'h0d, 8'h09};

  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t prod [4][4];                      // prod[r][k] = M[r][k] * s(k, c)
    for (genvar r = 0; r < 4; r++) begin : g_row
      for (genvar k = 0; k < 4; k++) begin : g_term
        // M[r][k] = row0[(k - r) mod 4]; FWD_ROW[3] is the leftmost entry.
        byte_t coef;
        assign coef = inverse ? INV_ROW[3 - ((k + 4 - r) % 4)]
                              : FWD_ROW[3 - ((k + 4 - r) % 4)];
        gf_mul u_mul (
          .a(coef),
          .b(state_in[127 - 8 * (4 * c + k) -: 8]),
          .p(prod[r][k])
        );
      end
      assign state_out[127 - 8 * (4 * c + r) -: 8] =
        prod[r][0] ^ prod[r][1] ^ prod[r][2] ^ prod[r][3];
    end
  end

endmodule
