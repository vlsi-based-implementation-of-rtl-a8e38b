// tb_aes_single_round_top -- end-to-end test of the single-round AES-128
// core at its only size. Plaintexts go in as four 32-bit words; every
// ciphertext word coming out is compared with the reference model (initial
// key addition plus AES round 1), and the first word of each block must
// appear exactly two clock edges after the edge that took the fourth
// plaintext word.
//
// Runs: the FIPS-197 example block (3243f6a8 885a308d 313198a2 e0370734
// under key 2b7e1516 28aed2a6 abf71588 09cf4f3c, expected a49c7ff2 689f352b
// 6b5bea43 026a5049), then random blocks sent back to back, with idle cycles
// between words, with a new key per block, and a reset in the middle of a
// block. Each of those situations is counted and must occur.
module tb_aes_single_round_top;
  import aes_ref_pkg::*;

  logic         clk = 0, rstn = 0;
  logic [127:0] key = '0;
  logic         pt_valid = 0, ct_valid;
  logic [31:0]  ptin = '0, ctout;
  int           checks = 0, failures = 0;

  aes_single_round_top dut (.clk, .rstn, .key, .pt_valid, .ptin, .ct_valid, .ctout);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clock edge counter
  longint edge_no = 0;
  always @(posedge clk) edge_no <= edge_no + 1;

  // expected ciphertext words and the edge at which each block's first
  // word must be sampled
  logic [31:0] exp_q [$];
  longint      due_q [$];
  int          word_in_block = 0;
  int          blocks_out = 0;

  int n_back_to_back = 0, n_gaps = 0, n_key_change = 0, n_reset = 0;

  always @(posedge clk) begin
    if (rstn) begin
      checks++;
      if (ct_valid !== (exp_q.size() != 0 && (word_in_block != 0 || due_q[0] == edge_no))) begin
        failures++;
        $display("FAIL ct_valid=%0b at edge %0d", ct_valid, edge_no);
      end
      if (ct_valid && exp_q.size() != 0) begin
        logic [31:0] e;
        e = exp_q.pop_front();
        checks++;
        if (ctout !== e) begin
          failures++;
          $display("FAIL ctout %08h, expected %08h", ctout, e);
        end
        if (word_in_block == 0) void'(due_q.pop_front());
        word_in_block = (word_in_block + 1) % 4;
        if (word_in_block == 0) blocks_out++;
      end
    end
  end

  // Send one block; idle cycles may precede each word.
  task automatic send_block(input logic [127:0] pt, input logic [127:0] k, input bit gaps);
    logic [127:0] ct;
    ct = ref_round1(pt, k);
    for (int w = 0; w < 4; w++) begin
      if (gaps && ($urandom_range(1) == 1)) begin
        pt_valid <= 0;
        n_gaps++;
        repeat (1 + $urandom % 3) @(posedge clk);
      end
      pt_valid <= 1;
      ptin     <= pt[127 - 32*w -: 32];
      key      <= (w == 3) ? k : rand128();  // the key only matters with word 4
      @(posedge clk);
    end
    // the edge just passed (edge_no - 1 after the update) took word 4
    #1;
    for (int w = 0; w < 4; w++) exp_q.push_back(ct[127 - 32*w -: 32]);
    due_q.push_back(edge_no - 1 + 2);
  endtask

  task automatic idle(input int n);
    pt_valid <= 0;
    repeat (n) @(posedge clk);
  endtask

  initial begin
    logic [127:0] k, prev_k;
    repeat (3) @(posedge clk);
    rstn <= 1;
    @(posedge clk);

    // the example block of the AES standard, as in a four-cycle input
    send_block(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 0);
    checks++;
    if (ref_round1(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c)
        !== 128'ha49c7ff2689f352b6b5bea43026a5049) begin
      failures++;
      $display("FAIL reference model disagrees with the published round-1 state");
    end
    idle(8);

    // back-to-back blocks under one key
    k = rand128();
    for (int i = 0; i < 20; i++) begin
      send_block(rand128(), k, 0);
      if (i > 0) n_back_to_back++;
    end
    idle(8);

    // idle cycles between words, new key every block
    prev_k = k;
    for (int i = 0; i < 20; i++) begin
      k = rand128();
      if (k != prev_k) n_key_change++;
      prev_k = k;
      send_block(rand128(), k, 1);
    end
    idle(8);

    // reset in the middle of a block: the partial block is dropped
    pt_valid <= 1;
    ptin     <= 32'h01234567;
    repeat (2) @(posedge clk);
    pt_valid <= 0;
    rstn     <= 0;
    n_reset++;
    @(posedge clk);
    rstn     <= 1;
    @(posedge clk);
    send_block(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 0);
    idle(8);

    checks += 6;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words never came out", exp_q.size()); end
    if (blocks_out != 42) begin failures++; $display("FAIL %0d blocks out, expected 42", blocks_out); end
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back blocks"); end
    if (n_gaps == 0)         begin failures++; $display("FAIL no idle cycles between words"); end
    if (n_key_change == 0)   begin failures++; $display("FAIL no key change"); end
    if (n_reset == 0)        begin failures++; $display("FAIL no reset during a block"); end
    $display("back_to_back=%0d gaps=%0d key_changes=%0d resets=%0d blocks=%0d",
             n_back_to_back, n_gaps, n_key_change, n_reset, blocks_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
