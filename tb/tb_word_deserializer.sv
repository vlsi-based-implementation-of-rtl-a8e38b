// tb_word_deserializer -- feeds random 128-bit blocks as four words, with
// and without idle cycles between words, and checks the assembled block,
// that block_valid is a single-cycle pulse one clock after the fourth word,
// and that reset clears a partly received block.
module tb_word_deserializer;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         in_valid = 0, in_last, block_valid;
  logic [31:0]  in_word = '0;
  logic [127:0] block;
  int           checks = 0, failures = 0;
  int           gaps = 0;

  word_deserializer dut (.clk, .rst_n, .in_valid, .in_word, .in_last, .block, .block_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count block_valid pulses
  int pulses = 0;
  always @(posedge clk) if (rst_n && block_valid) pulses++;

  task automatic send_block(input logic [127:0] b, input bit with_gaps);
    for (int w = 0; w < 4; w++) begin
      if (with_gaps && ($urandom_range(1) == 1)) begin
        in_valid <= 0;
        gaps++;
        repeat (1 + $urandom % 3) @(posedge clk);
      end
      in_valid <= 1;
      in_word  <= b[127 - 32*w -: 32];
      @(posedge clk);
      checks++;
      if (in_last !== (w == 3)) begin
        failures++;
        $display("FAIL in_last=%0b on word %0d", in_last, w);
      end
      // block_valid must stay low until the fourth word has been taken
      if (w < 3) begin
        checks++;
        if (block_valid) begin
          failures++;
          $display("FAIL early block_valid");
        end
      end
    end
    in_valid <= 0;
    #1;
    checks += 2;
    if (!block_valid) begin
      failures++;
      $display("FAIL block_valid not set one cycle after the fourth word");
    end
    if (block !== b) begin
      failures++;
      $display("FAIL block %032h, expected %032h", block, b);
    end
    @(posedge clk);
    #1;
    checks++;
    if (block_valid) begin
      failures++;
      $display("FAIL block_valid longer than one cycle");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 50; i++) send_block(rand128(), i % 2 == 1);
    // reset in the middle of a block: the next block must start afresh
    in_valid <= 1;
    in_word  <= 32'hdeadbeef;
    repeat (2) @(posedge clk);
    in_valid <= 0;
    rst_n    <= 0;
    @(posedge clk);
    rst_n    <= 1;
    @(posedge clk);
    send_block(128'h3243f6a8885a308d313198a2e0370734, 0);
    checks += 2;
    if (pulses != 51) begin
      failures++;
      $display("FAIL %0d block_valid pulses, expected 51", pulses);
    end
    if (gaps == 0) begin
      failures++;
      $display("FAIL no idle cycle between words was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
