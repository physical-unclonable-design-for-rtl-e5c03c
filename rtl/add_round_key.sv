// add_round_key -- AddRoundKey: the 4x4 state XORed with the four key words
// w(i) .. w(i+3) of the current round. The same step undoes itself, so it
// serves encryption and decryption alike.
//
// Interface: state_in, round_key, state_out. Combinational.
module add_round_key
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);
  timeunit 1ns;
  timeprecision 1ps;

  assign state_out = state_in ^ round_key;

endmodule
