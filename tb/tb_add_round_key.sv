// tb_add_round_key -- checks AddRoundKey on the FIPS-197 example and on
// random state/key pairs, with the expected value formed byte by byte.
module tb_add_round_key;
  import aes_ref_pkg::*;

  logic         clk = 0;
  logic [127:0] din, key, dout;
  int           checks = 0, failures = 0;

  add_round_key dut (.state_in(din), .round_key(key), .state_out(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [127:0] x, input logic [127:0] k, input logic [127:0] exp);
    din = x;
    key = k;
    @(posedge clk);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL ark(%032h, %032h) = %032h, expected %032h", x, k, dout, exp);
    end
  endtask

  initial begin
    check(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
          128'h193de3bea0f4e22b9ac68d2ae9f84808);
    repeat (200) begin
      rstate_t a, b, c;
      a = to_arr(rand128());
      b = to_arr(rand128());
      for (int n = 0; n < 16; n++) c[n] = a[n] ^ b[n];
      check(to_vec(a), to_vec(b), to_vec(c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
