// tb_aes_key_round: self-checking testbench for aes_key_round.
//
// Expands random cipher keys with the reference key schedule and checks
// that each of the ten forward steps turns round key r into round key r+1.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_aes_key_round;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  aes_block_t kin, kout;
  aes_byte_t rc;
  aes_key_round dut (.key_in(kin), .rc(rc), .key_out(kout));

  initial begin
    for (int n = 0; n < 20; n++) begin
      logic [127:0] key;
      key = (n == 0) ? byte_reverse(128'h2b7e151628aed2a6abf7158809cf4f3c) : rand128();
      rc = 8'h01;
      for (int r = 0; r < 10; r++) begin
        kin = ref_round_key(key, r); #1;
        check($sformatf("key %0d round %0d", n, r + 1), kout, ref_round_key(key, r + 1));
        rc = ref_mul(rc, 8'h02);
      end
    end
    // FIPS-197 Appendix A.1: last round key d014f9a8c9ee2589e13f0cc8b6630ca6
    kin = ref_round_key(byte_reverse(128'h2b7e151628aed2a6abf7158809cf4f3c), 9); rc = 8'h36; #1;
    check("fips round 10", kout, byte_reverse(128'hd014f9a8c9ee2589e13f0cc8b6630ca6));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
