// aes_sbox -- the AES byte substitution (S-box) for one byte, computed in
// logic rather than read from a table.
//
// The substitution is done in the two steps that define it: the byte is
// replaced by its multiplicative inverse in GF(2^8) modulo 0x11B (zero maps
// to zero), and the result goes through the affine transformation
//   b = M * x + c,  c = {1,1,0,0,0,1,1,0} for b0..b7 (0x63),
// where row i of the 8 x 8 bit matrix M has ones in columns i, i+4, i+5,
// i+6 and i+7 (mod 8). The matrix and constant are the standard ones.
//
// The inverse is formed as x^254 (x^255 = 1 for x != 0): the squares
// x^2 .. x^128 are multiplied together. Building the inverse from
// multipliers instead of a 256-entry ROM is this design's own choice; the
// published design appears to have held the table in block RAM.
//
// Interface: din (8 bits) in, dout (8 bits) out. Purely combinational,
// no clock.
module aes_sbox
  import aes_pkg::*;
(
  input  aes_byte_t din,
  output aes_byte_t dout
);

  // Rows of the affine matrix: bit j of AFFINE_ROW[i] is M(i,j).
  localparam aes_byte_t AFFINE_ROW [8] = '{8'hF1, 8'hE3, 8'hC7, 8'h8F,
                                           8'h1F, 8'h3E, 8'h7C, 8'hF8};
  localparam aes_byte_t AFFINE_C = 8'h63;

  aes_byte_t inv;

  // x^254 = x^2 * x^4 * x^8 * x^16 * x^32 * x^64 * x^128
  always_comb begin
    aes_byte_t sq;
    aes_byte_t prod;
    sq   = gf_mul(din, din);   // x^2
    prod = sq;
    for (int k = 2; k <= 7; k++) begin
      sq   = gf_mul(sq, sq);   // x^(2^k)
      prod = gf_mul(prod, sq);
    end
    inv = prod;
  end

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      dout[i] = ^(AFFINE_ROW[i] & inv) ^ AFFINE_C[i];
    end
  end

endmodule
