// aes_pkg -- types and GF(2^8) arithmetic shared by the AES-128 single-round
// encryption core.
//
// The 128-bit AES state is a 4 x 4 matrix of bytes filled column by column:
// input byte n (n = 0 first, in the most significant bits of the 128-bit
// vector) is the matrix entry S(r,c) with n = r + 4c. The state is carried as
// a packed array of 16 bytes; byte n sits at element 15-n so that the first
// byte is the most significant one, as in the usual hexadecimal notation of
// AES test vectors. state_byte() hides that reversal.
//
// gf_mul() multiplies in GF(2^8) modulo the AES polynomial
// x^8 + x^4 + x^3 + x + 1 (0x11B) by shift-and-add; xtime() is the
// multiplication by {02}. Everything here is combinational.
package aes_pkg;

  typedef logic [7:0]        aes_byte_t;
  typedef logic [31:0]       aes_word_t;
  typedef logic [15:0][7:0]  aes_state_t;

  // Element position of matrix entry S(r,c) in aes_state_t.
  function automatic int unsigned state_pos(input int unsigned r, input int unsigned c);
    return 15 - (r + 4 * c);
  endfunction

  // Multiplication by {02} in GF(2^8).
  function automatic aes_byte_t xtime(input aes_byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  // General multiplication in GF(2^8).
  function automatic aes_byte_t gf_mul(input aes_byte_t a, input aes_byte_t b);
    aes_byte_t acc;
    aes_byte_t p;
    acc = '0;
    p   = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc = acc ^ p;
      p = xtime(p);
    end
    return acc;
  endfunction

endpackage
