// tb_shift_rows -- checks ShiftRows on a state whose bytes name their own
// positions, on the FIPS-197 first-round state and on random states.
module tb_shift_rows;
  import aes_ref_pkg::*;

  logic         clk = 0;
  logic [127:0] din, dout;
  int           checks = 0, failures = 0;

  shift_rows dut (.state_in(din), .state_out(dout));

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
      $display("FAIL shift_rows(%032h) = %032h, expected %032h", x, dout, exp);
    end
  endtask

  initial begin
    // byte n holds n: output columns are (0,5,10,15) (4,9,14,3) (8,13,2,7) (12,1,6,11)
    check(128'h000102030405060708090a0b0c0d0e0f, 128'h00050a0f04090e03080d02070c01060b);
    check(128'hd42711aee0bf98f1b8b45de51e415230, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    repeat (200) begin
      logic [127:0] x;
      x = rand128();
      check(x, ref_shift_rows(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
