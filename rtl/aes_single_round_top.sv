// aes_single_round_top -- single-round AES-128 encryption core with a
// 32-bit word interface.
//
// A 128-bit plaintext arrives as four 32-bit words on ptin (most
// significant word first, each marked by pt_valid). When the fourth word
// has been taken, the block and the cipher key go through the initial
// AddRoundKey and one AES round (SubBytes, ShiftRows, MixColumns,
// AddRoundKey with round key 1 computed on the fly), and the 128-bit result
// leaves as four 32-bit words on ctout, marked by ct_valid.
//
// Datapath: word_deserializer -> aes_round_datapath (combinational, one
// clock period) -> word_serializer. The key is registered together with
// the fourth plaintext word, so it need only be valid on that cycle.
//
// Timing: the fourth plaintext word is sampled at clock edge e; the
// assembled block is registered at e, the round result is loaded into the
// output register at e+1, and the first ciphertext word is on ctout from
// e+1 to e+2, the others on the following three cycles. A new block may
// follow the previous one immediately, giving one block per four cycles.
//
// Interface: clk, rstn (asynchronous, active low), key[127:0], pt_valid,
// ptin[31:0]; out ct_valid, ctout[31:0].
//
// From the published single-round design: the transformation order, the
// 128-bit key length, the clk/rstn/ptin/ctout names and the 32-bit,
// four-cycle transfer of plaintext and result. This design's own choices:
// the key input port, the pt_valid/ct_valid strobes, asynchronous reset and
// the two-edge latency.
module aes_single_round_top
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rstn,
  input  aes_state_t key,
  input  logic       pt_valid,
  input  aes_word_t  ptin,
  output logic       ct_valid,
  output aes_word_t  ctout
);

  aes_state_t pt_block, key_q, round_out;
  logic       block_valid, in_last;

  word_deserializer u_in (
    .clk, .rst_n(rstn),
    .in_valid(pt_valid), .in_word(ptin),
    .in_last, .block(pt_block), .block_valid
  );

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn)         key_q <= '0;
    else if (in_last)  key_q <= key;
  end

  aes_round_datapath u_round (
    .plaintext(pt_block), .cipher_key(key_q),
    .round_key(), .round_out
  );

  word_serializer u_out (
    .clk, .rst_n(rstn),
    .load(block_valid), .block(round_out),
    .out_valid(ct_valid), .out_word(ctout)
  );

endmodule
