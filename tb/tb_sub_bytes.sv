// tb_sub_bytes -- checks SubBytes on the first-round state of the FIPS-197
// example and on random states against the reference model.
module tb_sub_bytes;
  import aes_ref_pkg::*;

  logic         clk = 0;
  logic [127:0] din, dout;
  int           checks = 0, failures = 0;

  sub_bytes dut (.state_in(din), .state_out(dout));

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
      $display("FAIL sub_bytes(%032h) = %032h, expected %032h", x, dout, exp);
    end
  endtask

  initial begin
    check(128'h193de3bea0f4e22b9ac68d2ae9f84808, 128'hd42711aee0bf98f1b8b45de51e415230);
    repeat (200) begin
      logic [127:0] x;
      x = rand128();
      check(x, ref_sub_bytes(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
