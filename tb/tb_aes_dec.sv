// tb_aes_dec: self-checking testbench for the iterative decryptor aes_dec.
//
// Decrypts known-answer vectors given as ciphertext plus last round key:
// FIPS-197 Appendix B, the all-zero key and block, and the design's own
// example block; then 40 random blocks encrypted by the behavioural
// reference. For every block it checks the round-constant sequence
// 36 1b 80 ... 01 00, that the round-key register walks the reference key
// schedule backwards to the cipher key, that done rises exactly ten clocks
// after the load, and that plaintext and done hold afterwards.
module tb_aes_dec;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst;
  aes_block_t ciphertext, dec_key, plaintext;
  logic       done;

  aes_dec dut (.clk(clk), .rst(rst), .ciphertext(ciphertext), .dec_key(dec_key),
               .plaintext(plaintext), .done(done));

  localparam logic [7:0] RC_SEQ [11] = '{8'h36, 8'h1b, 8'h80, 8'h40, 8'h20, 8'h10,
                                         8'h08, 8'h04, 8'h02, 8'h01, 8'h00};

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

  // cipher_key is only used to predict the intermediate round keys.
  task automatic decrypt(input string name, input aes_block_t ct, input aes_block_t cipher_key,
                         input aes_block_t exp_pt);
    int cycles;
    @(negedge clk);
    ciphertext = ct; dec_key = ref_round_key(cipher_key, 10); rst = 1'b0;
    @(negedge clk);
    rst = 1'b1;
    ciphertext = rand128(); dec_key = rand128();
    cycles = 0;
    while (!done && cycles < 20) begin
      check($sformatf("%s rc %0d", name, cycles), 128'(dut.rc), 128'(RC_SEQ[cycles]));
      check($sformatf("%s round key %0d", name, cycles), dut.key_q,
            ref_round_key(cipher_key, 10 - cycles));
      @(negedge clk);
      cycles++;
    end
    check($sformatf("%s latency", name), 128'(cycles), 128'(NUM_ROUNDS));
    check($sformatf("%s last round key", name), dut.key_q, cipher_key);
    check($sformatf("%s plaintext", name), plaintext, exp_pt);
    repeat (3) @(negedge clk);
    check($sformatf("%s held", name), {plaintext, 127'(done)}, {exp_pt, 127'(1)});
  endtask

  initial begin
    rst = 1'b1;
    ciphertext = '0;
    dec_key = '0;
    // FIPS-197 Appendix B; its last round key packs to a60c63b6...a8f914d0.
    check("fips197 B last round key",
          ref_round_key(byte_reverse(128'h2b7e151628aed2a6abf7158809cf4f3c), 10),
          128'ha60c63b6c80c3fe18925eec9a8f914d0);
    decrypt("fips197 B", 128'h320b6a19978511dcfb09dc021d842539,
            128'h3c4fcf098815f7aba6d2ae2816157e2b, 128'h340737e0a29831318d305a88a8f64332);
    // All-zero key and block; last round key packs to 8e188f6f...cb5befb4.
    check("zero last round key", ref_round_key('0, 10), 128'h8e188f6fcf51e92311e2923ecb5befb4);
    decrypt("zero", 128'h2e2b34ca59fa4c883b2c8aefd44be966, '0, '0);
    decrypt("example", 128'h97ef6624f3ca9ea860367a0db47bd73a,
            128'h3c4fcf098815f7aba6d2ae2816157e2b, 128'h2a179373117e3de9969f402ee2bec16b);
    for (int n = 0; n < 40; n++) begin
      aes_block_t pt, k;
      pt = rand128();
      k  = rand128();
      decrypt($sformatf("random %0d", n), ref_encrypt(pt, k), k, pt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
