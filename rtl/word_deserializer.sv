// word_deserializer -- plaintext input port: assembles a 128-bit block from
// four 32-bit words taken on four clock cycles.
//
// Each cycle with in_valid high shifts in_word into the low end of a 128-bit
// shift register, so the first word ends up in the most significant bits
// (state column 0) and the fourth in the least significant bits (column 3).
// A 2-bit counter tracks the word position; on the cycle after the fourth
// word, block_valid is high for one cycle with the complete block on
// block. Gaps (in_valid low) between words are allowed and simply pause the
// count. The block stays on block until the next word is taken.
//
// Interface: clk, rst_n (asynchronous, active low: clears the counter and
// block_valid), in_valid, in_word[31:0]; out block[127:0], block_valid,
// in_last (high while the word being taken is the fourth of a block).
// Timing: block_valid rises one clock after the fourth word is sampled.
module word_deserializer
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  aes_word_t  in_word,
  output logic       in_last,
  output aes_state_t block,
  output logic       block_valid
);

  logic [1:0] count;

  assign in_last = in_valid && (count == 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count       <= '0;
      block       <= '0;
      block_valid <= 1'b0;
    end else begin
      block_valid <= in_last;
      if (in_valid) begin
        block <= {block[11:0], in_word};
        count <= count + 2'd1;
      end
    end
  end

endmodule
