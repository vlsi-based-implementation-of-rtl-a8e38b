// word_serializer -- ciphertext output port: sends a 128-bit block as four
// 32-bit words on four consecutive clock cycles, most significant word
// (state column 0) first.
//
// A load pulse copies block into a shift register; out_word is its top 32
// bits and out_valid is high for exactly four cycles, the register moving
// up by one word per cycle. A load on the cycle that shows the fourth word
// starts the next block with no gap, so a new block every four cycles gives
// an unbroken stream of words. A load earlier than that would cut the
// current block short; an assertion flags it.
//
// Interface: clk, rst_n (asynchronous, active low), load, block[127:0];
// out out_valid, out_word[31:0]. Timing: the first word is on out_word in
// the cycle after load.
module word_serializer
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  aes_state_t block,
  output logic       out_valid,
  output aes_word_t  out_word
);

  aes_state_t sreg;
  logic [1:0] count;

  assign out_word = sreg[15:12];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg      <= '0;
      count     <= '0;
      out_valid <= 1'b0;
    end else if (load) begin
      sreg      <= block;
      count     <= '0;
      out_valid <= 1'b1;
    end else if (out_valid) begin
      sreg      <= {sreg[11:0], 32'h0};
      count     <= count + 2'd1;
      out_valid <= (count != 2'd3);
    end
  end

  // A new block may only be loaded when idle or on the last word.
  a_no_overrun : assert property (@(posedge clk) disable iff (!rst_n)
                                  load |-> (!out_valid || count == 2'd3))
    else $error("word_serializer: load while a block is still being sent");

endmodule
