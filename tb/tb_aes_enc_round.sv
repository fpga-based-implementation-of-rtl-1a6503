// tb_aes_enc_round: self-checking testbench for aes_enc_round.
//
// Drives random states and sub-keys with the final-round select both ways
// and compares the AddRoundKey tap and the next state with the reference
// SubBytes, ShiftRows and MixColumns.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_aes_enc_round;
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

  aes_block_t st, sk, added, nxt;
  logic fin;
  aes_enc_round dut (.state_in(st), .subkey(sk), .final_round(fin), .added(added), .next_state(nxt));

  initial begin
    for (int n = 0; n < 200; n++) begin
      byte_arr_t a;
      st = rand128(); sk = rand128(); fin = n[0]; #1;
      a = ref_shift(ref_sub(to_arr(st ^ sk)));
      if (!fin) a = ref_mix(a);
      check($sformatf("added %0d", n), added, st ^ sk);
      check($sformatf("next %0d final=%0d", n, fin), nxt, from_arr(a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
