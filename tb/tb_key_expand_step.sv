// tb_key_expand_step -- checks one key-schedule step against the FIPS-197
// AES-128 key expansion (round keys 1 and 2 of key 2b7e1516...) and random
// keys against the reference model, for Rcon {01} and {02}.
module tb_key_expand_step;
  import aes_ref_pkg::*;

  logic         clk = 0;
  logic [127:0] k0, k1, k1b, k2;
  int           checks = 0, failures = 0;

  key_expand_step                dut1 (.key_in(k0), .key_out(k1));
  key_expand_step #(.RCON(8'h02)) dut2 (.key_in(k1b), .key_out(k2));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [127:0 ] x, input logic [127:0] e1, input logic [127:0] e2);
    k0  = x;
    k1b = e1;
    @(posedge clk);
    checks += 2;
    if (k1 !== e1) begin
      failures++;
      $display("FAIL rk1(%032h) = %032h, expected %032h", x, k1, e1);
    end
    if (k2 !== e2) begin
      failures++;
      $display("FAIL rk2(%032h) = %032h, expected %032h", e1, k2, e2);
    end
  endtask

  initial begin
    check(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'ha0fafe1788542cb123a339392a6c7605,
          128'hf2c295f27a96b9435935807a7359f67f);
    repeat (100) begin
      logic [127:0] x, e1;
      x  = rand128();
      e1 = ref_next_key(x, 8'h01);
      check(x, e1, ref_next_key(e1, 8'h02));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
