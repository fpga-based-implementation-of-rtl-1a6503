// tb_aes_inv_sub_bytes: self-checking testbench for aes_inv_sub_bytes.
//
// Compares 200 random states with the reference InvSubBytes, plus the
// inverse of the FIPS-197 Appendix B first SubBytes.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_aes_inv_sub_bytes;
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

  aes_block_t din, dout;
  aes_inv_sub_bytes dut (.in_state(din), .out_state(dout));

  initial begin
    din = byte_reverse(128'hd42711aee0bf98f1b8b45de51e415230); #1;
    check("known 0", dout, byte_reverse(128'h193de3bea0f4e22b9ac68d2ae9f84808));
    for (int n = 0; n < 200; n++) begin
      din = rand128(); #1;
      check($sformatf("random %0d", n), dout, from_arr(ref_inv_sub(to_arr(din))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
