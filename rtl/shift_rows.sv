// shift_rows -- ShiftRows / InvShiftRows on the 4x4 byte state.
//
// Row r is rotated by r byte positions: to the left when encrypting
// (row 0 stays, row 1 by one, row 2 by two, row 3 by three) and to the right
// when inverse = 1 for decryption. It is pure wiring selected by a 2:1 mux.
//
// Interface: state_in, inverse, state_out (column-major, see aes_pkg).
// Timing: combinational.
module shift_rows
  import aes_pkg::*;
(
  input  block_t state_in,
  input  logic   inverse,
  output block_t state_out
);
  timeunit 1ns;
  timeprecision 1ps;

  block_t left;
  block_t right;

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      // out(r, c) = in(r, c + r) for a left rotation, in(r, c - r) for right.
      assign left [127 - 8 * (4 * c + r) -: 8] = state_in[127 - 8 * (4 * ((c + r) % 4) + r) -: 8];
      assign right[127 - 8 * (4 * c + r) -: 8] = state_in[127 - 8 * (4 * ((c + 4 - r) % 4) + r) -: 8];
    end
  end

  assign state_out = inverse ? right : left;

endmodule
