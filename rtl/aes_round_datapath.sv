// aes_round_datapath -- the combinational datapath of single-round AES-128
// encryption: the plaintext is XORed with the cipher key (initial
// AddRoundKey), then passes through SubBytes, ShiftRows, MixColumns and a
// second AddRoundKey with round key 1, which key_expand_step derives from
// the cipher key. The result is the state at the end of AES round 1.
//
// With ROUND_RCON left at 8'h01 this is exactly the first AES round. The
// initial key addition is part of this block, so a plaintext and a key give
// the round-1 output directly.
//
// Interface: plaintext and cipher_key in (128 bits each), round_out and the
// round key used (round_key, 128 bits each) out. No clock: the caller
// registers around it.
module aes_round_datapath
  import aes_pkg::*;
#(
  parameter aes_byte_t ROUND_RCON = 8'h01
) (
  input  aes_state_t plaintext,
  input  aes_state_t cipher_key,
  output aes_state_t round_key,
  output aes_state_t round_out
);

  aes_state_t s_ark0, s_sub, s_shift, s_mix;

  add_round_key u_ark0 (.state_in(plaintext), .round_key(cipher_key), .state_out(s_ark0));
  sub_bytes     u_sub  (.state_in(s_ark0),    .state_out(s_sub));
  shift_rows    u_shr  (.state_in(s_sub),     .state_out(s_shift));
  mix_columns   u_mix  (.state_in(s_shift),   .state_out(s_mix));

  key_expand_step #(.RCON(ROUND_RCON)) u_key (.key_in(cipher_key), .key_out(round_key));

  add_round_key u_ark1 (.state_in(s_mix), .round_key(round_key), .state_out(round_out));

endmodule
