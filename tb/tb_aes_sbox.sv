// tb_aes_sbox -- checks the S-box on all 256 inputs against the reference
// model and on published AES S-box entries.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic       clk = 0;
  logic [7:0] din, dout;
  int         checks = 0, failures = 0;

  aes_sbox dut (.din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] x, input logic [7:0] exp);
    din = x;
    @(posedge clk);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL sbox(%02h) = %02h, expected %02h", x, dout, exp);
    end
  endtask

  initial begin
    check(8'h00, 8'h63);
    check(8'h01, 8'h7C);
    check(8'h53, 8'hED);
    check(8'h19, 8'hD4);
    check(8'hFF, 8'h16);
    for (int x = 0; x < 256; x++) check(8'(x), ref_sbox(8'(x)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
