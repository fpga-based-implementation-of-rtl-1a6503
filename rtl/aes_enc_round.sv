// aes_enc_round: the encryptor's combinational round function.
//
// The registered state is XORed with the current sub-key (Key Addition
// Layer). That sum is the ciphertext tap: after the last round it is the
// finished ciphertext. The sum then goes through SubBytes (Byte Substitution
// Layer) and ShiftRows and MixColumns (Diffusion Layer). On the final round a
// multiplexer takes the ShiftRows output instead, skipping MixColumns. The
// result is fed back to the state register.
//
// Ports: state_in and subkey (128 bits each), final_round (1 = skip
// MixColumns); added (state_in ^ subkey) and next_state. No clock.
module aes_enc_round
  import aes_pkg::*;
(
  input  aes_block_t state_in,
  input  aes_key_t   subkey,
  input  logic       final_round,
  output aes_block_t added,
  output aes_block_t next_state
);
  aes_block_t sb_out, sr_out, mc_out;

  always_comb added = state_in ^ subkey;

  aes_sub_bytes   u_sb (.in_state(added),  .out_state(sb_out));
  aes_shift_rows  u_sr (.in_state(sb_out), .out_state(sr_out));
  aes_mix_columns u_mc (.in_state(sr_out), .out_state(mc_out));

  always_comb next_state = final_round ? sr_out : mc_out;
endmodule
