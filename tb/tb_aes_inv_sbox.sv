// tb_aes_inv_sbox: self-checking testbench for aes_inv_sbox.
//
// Applies all 256 byte values and compares with the inverse of a reference
// S-box, plus known values.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_aes_inv_sbox;
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

  aes_byte_t din, dout;
  aes_inv_sbox dut (.in_byte(din), .out_byte(dout));

  initial begin
    for (int a = 0; a < 256; a++) begin
      din = 8'(a); #1;
      check($sformatf("inv_sbox(%02h)", a), 128'(dout), 128'(ref_inv_sbox(8'(a))));
    end
    din = 8'h63; #1; check("inv_sbox(63)", 128'(dout), 128'h00);
    din = 8'hed; #1; check("inv_sbox(ed)", 128'(dout), 128'h53);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
