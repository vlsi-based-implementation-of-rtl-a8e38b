// add_round_key -- the AddRoundKey transformation: the round key is added to
// the state in GF(2^8), which is a bitwise XOR, T(r,c) = S(r,c) ^ K(r,c).
// All 16 byte additions happen at once as one 128-bit XOR.
//
// Interface: 128-bit state and 128-bit round key in, 128-bit state out.
// Purely combinational.
module add_round_key
  import aes_pkg::*;
(
  input  aes_state_t state_in,
  input  aes_state_t round_key,
  output aes_state_t state_out
);

  assign state_out = state_in ^ round_key;

endmodule
