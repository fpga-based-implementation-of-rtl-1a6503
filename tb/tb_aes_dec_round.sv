// tb_aes_dec_round: self-checking testbench for aes_dec_round.
//
// Drives random states and round keys with the first-round select both ways
// and compares the AddRoundKey tap and the next state with the reference
// InvMixColumns, InvShiftRows and InvSubBytes.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_aes_dec_round;
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

  aes_block_t st, rk, added, nxt;
  logic first;
  aes_dec_round dut (.state_in(st), .round_key(rk), .first_round(first), .added(added), .next_state(nxt));

  initial begin
    for (int n = 0; n < 200; n++) begin
      byte_arr_t a;
      st = rand128(); rk = rand128(); first = n[0]; #1;
      a = to_arr(st ^ rk);
      if (!first) a = ref_inv_mix(a);
      a = ref_inv_sub(ref_inv_shift(a));
      check($sformatf("added %0d", n), added, st ^ rk);
      check($sformatf("next %0d first=%0d", n, first), nxt, from_arr(a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
