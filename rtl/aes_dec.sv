// aes_dec: iterative AES-128 decryptor, the mirror image of aes_enc.
//
// The key input is the last (round 10) round key, not the cipher key: the
// key register runs the key schedule backwards, one round key per clock,
// ending at the cipher key. A 128-bit state register loads the ciphertext on
// a clock edge with rst low. Each clock the round function XORs the state
// with the current round key (that sum is the plaintext output), applies
// InvMixColumns except on the first round, then InvShiftRows and InvSubBytes,
// and feeds the result back. The controller counts the round constant down
// from 0x36 to 0x00.
//
// Timing: load with rst low on edge 0; done rises after edge 10 and
// plaintext then holds the result until the next load. One block per 10
// clocks. rst is a synchronous, active-low load, as in the published
// waveform, where rst = 0 coincides with the new ciphertext being selected.
//
// Byte order: AES byte i in bits [8i+7:8i] (see aes_pkg).
module aes_dec
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,      // active-low synchronous load
  input  aes_block_t ciphertext,
  input  aes_key_t   dec_key,
  output aes_block_t plaintext,
  output logic       done
);
  aes_block_t state_q, next_state;
  aes_key_t   key_q, prev_key;
  aes_byte_t  rc;
  logic       first_round;

  aes_dec_ctrl u_ctrl (
    .clk(clk), .rst(rst), .rc(rc), .first_round(first_round), .done(done)
  );

  aes_dec_round u_round (
    .state_in(state_q), .round_key(key_q), .first_round(first_round),
    .added(plaintext), .next_state(next_state)
  );

  aes_inv_key_round u_key_round (.key_in(key_q), .rc(rc), .key_out(prev_key));

  always_ff @(posedge clk) begin
    if (!rst) begin
      state_q <= ciphertext;
      key_q   <= dec_key;
    end else if (!done) begin
      state_q <= next_state;
      key_q   <= prev_key;
    end
  end
endmodule
