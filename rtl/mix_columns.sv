// mix_columns -- the MixColumns transformation: each of the four state
// columns (s0, s1, s2, s3, top to bottom) is multiplied over GF(2^8) by the
// circulant matrix
//   | 02 03 01 01 |
//   | 01 02 03 01 |
//   | 01 01 02 03 |
//   | 03 01 01 02 |
// Multiplication by {02} is xtime(); {03}*s is xtime(s) ^ s; additions
// are XORs. This is the standard AES matrix; it is the one that reproduces
// the published round-1 result.
//
// Interface: 128-bit state in, 128-bit state out. Purely combinational.
module mix_columns
  import aes_pkg::*;
(
  input  aes_state_t state_in,
  output aes_state_t state_out
);

  always_comb begin
    for (int unsigned c = 0; c < 4; c++) begin
      for (int unsigned r = 0; r < 4; r++) begin
        // row r: {02} at column r, {03} at r+1, {01} at r+2 and r+3
        state_out[state_pos(r, c)] =
            xtime(state_in[state_pos(r, c)])
          ^ xtime(state_in[state_pos((r + 1) % 4, c)]) ^ state_in[state_pos((r + 1) % 4, c)]
          ^ state_in[state_pos((r + 2) % 4, c)]
          ^ state_in[state_pos((r + 3) % 4, c)];
      end
    end
  end

endmodule
