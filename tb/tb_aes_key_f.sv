// tb_aes_key_f: self-checking testbench for aes_key_f.
//
// Compares random words and round constants with RotWord/SubWord/Rcon
// written out in the testbench, plus the FIPS-197 Appendix A.1 value for
// w3 = 09cf4f3c (giving 8b84eb01).
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_aes_key_f;
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

  aes_word_t din, dout;
  aes_byte_t rc;
  aes_key_f dut (.in_word(din), .rc(rc), .out_word(dout));

  initial begin
    // Byte 0 of the word is 09, so the packed word reads 3c4fcf09.
    din = 32'h3c4fcf09; rc = 8'h01; #1;
    check("fips w3", 128'(dout), 128'(32'h01eb848b));
    for (int n = 0; n < 300; n++) begin
      logic [7:0] b [4];
      logic [31:0] exp;
      din = $urandom; rc = 8'($urandom); #1;
      for (int i = 0; i < 4; i++) b[i] = din[8*i +: 8];
      exp = {ref_sbox(b[0]), ref_sbox(b[3]), ref_sbox(b[2]), ref_sbox(b[1]) ^ rc};
      check($sformatf("random %0d", n), 128'(dout), 128'(exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
