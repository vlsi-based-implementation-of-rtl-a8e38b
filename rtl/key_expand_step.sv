// key_expand_step -- one step of the AES-128 key schedule: from the four
// 32-bit words w[i-4..i-1] of one round key it forms the next four words
//   w[i]   = w[i-4] ^ SubWord(RotWord(w[i-1])) ^ Rcon
//   w[i+1] = w[i-3] ^ w[i]
//   w[i+2] = w[i-2] ^ w[i+1]
//   w[i+3] = w[i-1] ^ w[i+2]
// RotWord rotates the word left by one byte, SubWord passes each byte
// through the S-box and Rcon = {RCON, 00, 00, 00}. RCON is x^(j-1) in
// GF(2^8) for round key j, so the default 8'h01 produces round key 1 from
// the cipher key, which is what a single round needs.
//
// Only the 128-bit key length (Nk = 4) is built.
//
// Interface: key_in (128 bits, round key j-1), key_out (128 bits, round key
// j); the first word is in the most significant bits. Purely combinational.
module key_expand_step
  import aes_pkg::*;
#(
  parameter aes_byte_t RCON = 8'h01
) (
  input  aes_state_t key_in,
  output aes_state_t key_out
);

  aes_word_t w0, w1, w2, w3;
  aes_word_t rot, sub, n0, n1, n2, n3;

  assign {w0, w1, w2, w3} = key_in;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox u_sbox (.din(rot[8*b +: 8]), .dout(sub[8*b +: 8]));
  end

  assign n0 = w0 ^ sub ^ {RCON, 24'h000000};
  assign n1 = w1 ^ n0;
  assign n2 = w2 ^ n1;
  assign n3 = w3 ^ n2;

  assign key_out = {n0, n1, n2, n3};

endmodule
