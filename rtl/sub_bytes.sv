// sub_bytes -- the SubBytes transformation: every one of the 16 state bytes
// is replaced through its own S-box, all 16 in parallel.
//
// Interface: state_in and state_out are 128-bit AES states (first byte in
// the most significant bits). Purely combinational; each byte goes through
// one aes_sbox instance.
module sub_bytes
  import aes_pkg::*;
(
  input  aes_state_t state_in,
  output aes_state_t state_out
);

  for (genvar n = 0; n < 16; n++) begin : g_sbox
    aes_sbox u_sbox (.din(state_in[n]), .dout(state_out[n]));
  end

endmodule
