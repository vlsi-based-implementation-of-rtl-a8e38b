// tb_word_serializer -- loads random blocks, isolated and back to back, and
// checks that each leaves as four words, most significant first, on the
// four cycles after load, with out_valid high exactly then.
module tb_word_serializer;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         load = 0, out_valid;
  logic [127:0] block = '0;
  logic [31:0]  out_word;
  int           checks = 0, failures = 0;

  word_serializer dut (.clk, .rst_n, .load, .block, .out_valid, .out_word);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected word stream
  logic [31:0] exp_q [$];
  int          back_to_back = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== (exp_q.size() != 0)) begin
        failures++;
        $display("FAIL out_valid=%0b with %0d words expected", out_valid, exp_q.size());
      end else if (out_valid) begin
        logic [31:0] e;
        e = exp_q.pop_front();
        checks++;
        if (out_word !== e) begin
          failures++;
          $display("FAIL out_word %08h, expected %08h", out_word, e);
        end
      end
    end
  end

  task automatic load_block(input logic [127:0] b);
    load  <= 1;
    block <= b;
    @(posedge clk);
    load  <= 0;
    #1;
    for (int w = 0; w < 4; w++) exp_q.push_back(b[127 - 32*w -: 32]);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // isolated blocks
    for (int i = 0; i < 10; i++) begin
      load_block(rand128());
      repeat (4 + $urandom % 3) @(posedge clk);
    end
    // back-to-back blocks: a load on the cycle of the fourth word
    for (int i = 0; i < 10; i++) begin
      load_block(rand128());
      if (i > 0) back_to_back++;
      repeat (3) @(posedge clk);
    end
    repeat (8) @(posedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d words never sent", exp_q.size());
    end
    if (back_to_back == 0) begin
      failures++;
      $display("FAIL no back-to-back load exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
