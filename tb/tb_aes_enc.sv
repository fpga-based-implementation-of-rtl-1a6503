// tb_aes_enc: self-checking testbench for the iterative encryptor aes_enc.
//
// Encrypts known-answer vectors (the design's own example block, FIPS-197
// Appendix B and C.1) and 40 random plaintext/key pairs checked against the
// behavioural reference. For every block it checks that done rises exactly
// ten clocks after the load (one block per ten clocks) and not before, that
// the sub-key register steps through the reference key schedule, and that
// dataout and done hold after completion. One load is issued in the middle
// of an encryption to check that a new load restarts cleanly.
module tb_aes_enc;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst;
  aes_block_t datain, key, dataout;
  logic       done;

  aes_enc dut (.clk(clk), .rst(rst), .datain(datain), .key(key), .dataout(dataout), .done(done));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // Load on one edge, then count edges until done; expect exactly 10.
  task automatic encrypt(input string name, input aes_block_t pt, input aes_block_t k,
                         input aes_block_t exp_ct);
    int cycles;
    @(negedge clk);
    datain = pt; key = k; rst = 1'b0;
    @(negedge clk);
    rst = 1'b1;
    datain = rand128(); key = rand128();  // inputs are only sampled at the load
    cycles = 0;
    while (!done && cycles < 20) begin
      check($sformatf("%s sub-key %0d", name, cycles), dut.key_q, ref_round_key(k, cycles));
      @(negedge clk);
      cycles++;
    end
    check($sformatf("%s latency", name), 128'(cycles), 128'(NUM_ROUNDS));
    check($sformatf("%s ciphertext", name), dataout, exp_ct);
    repeat (3) @(negedge clk);
    check($sformatf("%s held", name), {dataout, 127'(done)}, {exp_ct, 127'(1)});
  endtask

  initial begin
    rst = 1'b1;
    datain = '0;
    key = '0;
    // The design's example block (byte 0 in the low bits).
    encrypt("example", 128'h2a179373117e3de9969f402ee2bec16b,
            128'h3c4fcf098815f7aba6d2ae2816157e2b, 128'h97ef6624f3ca9ea860367a0db47bd73a);
    encrypt("fips197 B", byte_reverse(128'h3243f6a8885a308d313198a2e0370734),
            byte_reverse(128'h2b7e151628aed2a6abf7158809cf4f3c),
            byte_reverse(128'h3925841d02dc09fbdc118597196a0b32));
    encrypt("fips197 C.1", byte_reverse(128'h00112233445566778899aabbccddeeff),
            byte_reverse(128'h000102030405060708090a0b0c0d0e0f),
            byte_reverse(128'h69c4e0d86a7b0430d8cdb78070b4c55a));
    // Abandon an encryption after four rounds, then start a fresh one.
    @(negedge clk);
    datain = rand128(); key = rand128(); rst = 1'b0;
    @(negedge clk);
    rst = 1'b1;
    repeat (4) @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      aes_block_t pt, k;
      pt = rand128();
      k  = rand128();
      encrypt($sformatf("random %0d", n), pt, k, ref_encrypt(pt, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
