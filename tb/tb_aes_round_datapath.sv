// tb_aes_round_datapath -- checks the single-round datapath (initial key
// addition plus round 1) on the two FIPS-197 example vectors and on random
// plaintext/key pairs against the reference model; also checks the round
// key it exposes.
module tb_aes_round_datapath;
  import aes_ref_pkg::*;

  logic         clk = 0;
  logic [127:0] pt, key, rk, ct;
  int           checks = 0, failures = 0;

  aes_round_datapath dut (.plaintext(pt), .cipher_key(key), .round_key(rk), .round_out(ct));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [127:0] p, input logic [127:0] k, input logic [127:0] exp);
    pt  = p;
    key = k;
    @(posedge clk);
    checks += 2;
    if (ct !== exp) begin
      failures++;
      $display("FAIL round(%032h, %032h) = %032h, expected %032h", p, k, ct, exp);
    end
    if (rk !== ref_next_key(k, 8'h01)) begin
      failures++;
      $display("FAIL round key of %032h = %032h", k, rk);
    end
  endtask

  initial begin
    check(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
          128'ha49c7ff2689f352b6b5bea43026a5049);
    check(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
          128'h89d810e8855ace682d1843d8cb128fe4);
    repeat (100) begin
      logic [127:0] p, k;
      p = rand128();
      k = rand128();
      check(p, k, ref_round1(p, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
