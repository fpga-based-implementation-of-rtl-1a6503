// tb_aes_top: end-to-end testbench for aes_top at its default configuration.
//
// Runs the encryptor and the decryptor at the same time as a round trip:
// while the encryptor works on block i, the decryptor takes block i-1's
// ciphertext together with the last round key that the encryptor's key
// register held when it finished, and must give back block i-1's plaintext.
// Ciphertexts are also checked against the behavioural reference, and the
// ten-clock latency of both cores is checked on every block.
//
// It counts the mechanisms the design has and fails if any never happened:
// the final round without MixColumns, the first decryption round without
// InvMixColumns, results held with done high while idle, a load that
// abandons a run in progress, and both cores busy on the same clock.
module tb_aes_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       enc_rst, dec_rst, enc_done, dec_done;
  aes_block_t enc_datain, enc_key, enc_dataout;
  aes_block_t dec_ciphertext, dec_key, dec_plaintext;

  aes_top dut (
    .clk(clk),
    .enc_rst(enc_rst), .enc_datain(enc_datain), .enc_key(enc_key),
    .enc_dataout(enc_dataout), .enc_done(enc_done),
    .dec_rst(dec_rst), .dec_ciphertext(dec_ciphertext), .dec_key(dec_key),
    .dec_plaintext(dec_plaintext), .dec_done(dec_done)
  );

  // mechanism counters
  int n_final_round = 0, n_first_round = 0, n_hold = 0, n_restart = 0, n_overlap = 0;
  bit started = 1'b0;

  always @(posedge clk) begin
    if (enc_rst && dut.u_enc.final_round && !enc_done) n_final_round++;
    if (dec_rst && dut.u_dec.first_round) n_first_round++;
    if (enc_rst && dec_rst && enc_done && dec_done && $past(enc_done) && $past(dec_done))
      n_hold++;
    if (enc_rst && dec_rst && !enc_done && !dec_done) n_overlap++;
    // a load while the core is still working abandons that run
    if (started && !enc_rst && !enc_done) n_restart++;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  task automatic check_count(input string what, input int n);
    checks++;
    $display("mechanism %-34s happened %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", what);
    end
  endtask

  localparam int BLOCKS = 40;

  initial begin
    aes_block_t pt [BLOCKS];
    aes_block_t k  [BLOCKS];
    aes_block_t ct [BLOCKS];
    aes_block_t k10 [BLOCKS];
    enc_rst = 1'b1; dec_rst = 1'b1;
    enc_datain = '0; enc_key = '0; dec_ciphertext = '0; dec_key = '0;
    for (int i = 0; i < BLOCKS; i++) begin
      pt[i] = (i == 0) ? 128'h2a179373117e3de9969f402ee2bec16b : rand128();
      k[i]  = (i == 0) ? 128'h3c4fcf098815f7aba6d2ae2816157e2b : rand128();
    end
    for (int i = 0; i <= BLOCKS; i++) begin
      int enc_cycles, dec_cycles, cycles;
      if (i % 5 == 3) begin
        // start both cores on throw-away data, then reload them mid-run
        @(negedge clk);
        enc_rst = 1'b0; dec_rst = 1'b0;
        enc_datain = rand128(); enc_key = rand128();
        dec_ciphertext = rand128(); dec_key = rand128();
        @(negedge clk);
        enc_rst = 1'b1; dec_rst = 1'b1;
        repeat (1 + i % 7) @(negedge clk);
      end
      @(negedge clk);
      if (i < BLOCKS) begin
        enc_rst = 1'b0; enc_datain = pt[i]; enc_key = k[i];
      end
      if (i > 0) begin
        dec_rst = 1'b0; dec_ciphertext = ct[i-1]; dec_key = k10[i-1];
      end
      @(negedge clk);
      enc_rst = 1'b1; dec_rst = 1'b1;
      started = 1'b1;
      enc_cycles = -1; dec_cycles = -1;
      for (cycles = 1; cycles <= 20; cycles++) begin
        @(negedge clk);
        if (enc_done && enc_cycles < 0) enc_cycles = cycles;
        if (dec_done && dec_cycles < 0) dec_cycles = cycles;
      end
      if (i < BLOCKS) begin
        ct[i]  = enc_dataout;
        k10[i] = dut.u_enc.key_q;
        check($sformatf("block %0d encrypt latency", i), 128'(enc_cycles), 128'(NUM_ROUNDS));
        check($sformatf("block %0d ciphertext", i), ct[i], ref_encrypt(pt[i], k[i]));
        check($sformatf("block %0d last round key", i), k10[i], ref_round_key(k[i], 10));
      end
      if (i > 0) begin
        check($sformatf("block %0d decrypt latency", i - 1), 128'(dec_cycles), 128'(NUM_ROUNDS));
        check($sformatf("block %0d round trip", i - 1), dec_plaintext, pt[i-1]);
      end
    end
    check("example ciphertext", ct[0], 128'h97ef6624f3ca9ea860367a0db47bd73a);
    check_count("final round (MixColumns skipped)", n_final_round);
    check_count("first round (InvMixColumns skipped)", n_first_round);
    check_count("result held while idle", n_hold);
    check_count("reload during a run", n_restart);
    check_count("encryptor and decryptor busy together", n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
