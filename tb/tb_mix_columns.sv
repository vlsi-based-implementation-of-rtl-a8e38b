// tb_mix_columns -- checks MixColumns on known column vectors, on the
// FIPS-197 first-round state and on random states.
module tb_mix_columns;
  import aes_ref_pkg::*;

  logic         clk = 0;
  logic [127:0] din, dout;
  int           checks = 0, failures = 0;

  mix_columns dut (.state_in(din), .state_out(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [127:0] x, input logic [127:0] exp);
    din = x;
    @(posedge clk);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL mix_columns(%032h) = %032h, expected %032h", x, dout, exp);
    end
  endtask

  initial begin
    // widely published column test vectors
    check(128'hdb135345f20a225c01010101c6c6c6c6, 128'h8e4da1bc9fdc589d01010101c6c6c6c6);
    check(128'hd4bf5d30e0b452aeb84111f11e2798e5, 128'h046681e5e0cb199a48f8d37a2806264c);
    repeat (200) begin
      logic [127:0] x;
      x = rand128();
      check(x, ref_mix_columns(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
