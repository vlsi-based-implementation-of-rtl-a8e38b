// shift_rows -- the ShiftRows transformation: row r of the 4 x 4 state is
// rotated left (circularly) by r byte positions, so row 0 is unchanged and
// row 3 moves by three. Output entry T(r,c) = S(r, (c + r) mod 4).
//
// Interface: 128-bit state in, 128-bit state out. Pure wiring, no clock.
module shift_rows
  import aes_pkg::*;
(
  input  aes_state_t state_in,
  output aes_state_t state_out
);

  always_comb begin
    for (int unsigned r = 0; r < 4; r++) begin
      for (int unsigned c = 0; c < 4; c++) begin
        state_out[state_pos(r, c)] = state_in[state_pos(r, (c + r) % 4)];
      end
    end
  end

endmodule
