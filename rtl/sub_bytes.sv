// sub_bytes -- SubBytes / InvSubBytes on the whole 128-bit state.
//
// Each of the 16 bytes of the 4x4 state is replaced independently by its
// S-box entry (or inverse S-box entry when inverse = 1), one aes_sbox per
// byte, so the whole state is substituted in one combinational pass.
//
// Interface: state_in, inverse, state_out (column-major, see aes_pkg).
// Timing: combinational.
module sub_bytes
  import aes_pkg::*;
(
  input  block_t state_in,
  input  logic   inverse,
  output block_t state_out
);
  timeunit 1ns;
  timeprecision 1ps;

  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_sbox u_sbox (
      .din    (state_in[127 - 8 * i -: 8]),
      .inverse(inverse),
      .dout   (state_out[127 - 8 * i -: 8])
    );
  end

endmodule
