// aes_ref_pkg -- reference model of the AES-128 transformations for the
// testbenches, written independently of the RTL: multiplication is a
// carry-less product followed by reduction modulo 0x11B, the S-box inverse
// is found by search, the affine step uses the rotate-and-XOR form
// b = x ^ rotl(x,1) ^ rotl(x,2) ^ rotl(x,3) ^ rotl(x,4) ^ 0x63, and the
// state is handled as a plain byte array in input order.
package aes_ref_pkg;

  typedef logic [7:0] rbyte_t;
  typedef rbyte_t     rstate_t [16];   // element n = input byte n

  function automatic rbyte_t ref_mul(input rbyte_t a, input rbyte_t b);
    logic [14:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'(9'h11B) << (i - 8);
    return p[7:0];
  endfunction

  function automatic rbyte_t rotl8(input rbyte_t x, input int n);
    return rbyte_t'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic rbyte_t ref_sbox(input rbyte_t x);
    rbyte_t inv;
    inv = 8'h00;
    if (x != 0) begin
      for (int y = 1; y < 256; y++) if (ref_mul(x, rbyte_t'(y)) == 8'h01) inv = rbyte_t'(y);
    end
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  function automatic rstate_t to_arr(input logic [127:0] v);
    rstate_t a;
    for (int n = 0; n < 16; n++) a[n] = v[127 - 8*n -: 8];
    return a;
  endfunction

  function automatic logic [127:0] to_vec(input rstate_t a);
    logic [127:0] v;
    for (int n = 0; n < 16; n++) v[127 - 8*n -: 8] = a[n];
    return v;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(input logic [127:0] v);
    rstate_t a;
    a = to_arr(v);
    for (int n = 0; n < 16; n++) a[n] = ref_sbox(a[n]);
    return to_vec(a);
  endfunction

  // row r, column c is byte r + 4c; new(r,c) = old(r, c + r)
  function automatic logic [127:0] ref_shift_rows(input logic [127:0] v);
    rstate_t a, b;
    a = to_arr(v);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) b[r + 4*c] = a[r + 4*((c + r) % 4)];
    return to_vec(b);
  endfunction

  function automatic logic [127:0] ref_mix_columns(input logic [127:0] v);
    rstate_t a, b;
    rbyte_t m [4][4];
    m = '{'{2, 3, 1, 1}, '{1, 2, 3, 1}, '{1, 1, 2, 3}, '{3, 1, 1, 2}};
    a = to_arr(v);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        b[r + 4*c] = 8'h00;
        for (int k = 0; k < 4; k++) b[r + 4*c] ^= ref_mul(m[r][k], a[k + 4*c]);
      end
    return to_vec(b);
  endfunction

  function automatic logic [127:0] ref_next_key(input logic [127:0] k, input rbyte_t rcon);
    logic [31:0] w [8];
    logic [31:0] t;
    for (int i = 0; i < 4; i++) w[i] = k[127 - 32*i -: 32];
    t = {w[3][23:0], w[3][31:24]};
    t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
    t ^= {rcon, 24'h0};
    for (int i = 4; i < 8; i++) begin
      w[i] = w[i-4] ^ ((i == 4) ? t : w[i-1]);
    end
    return {w[4], w[5], w[6], w[7]};
  endfunction

  // initial AddRoundKey followed by AES round 1
  function automatic logic [127:0] ref_round1(input logic [127:0] pt, input logic [127:0] key);
    logic [127:0] s;
    s = pt ^ key;
    s = ref_mix_columns(ref_shift_rows(ref_sub_bytes(s)));
    return s ^ ref_next_key(key, 8'h01);
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
