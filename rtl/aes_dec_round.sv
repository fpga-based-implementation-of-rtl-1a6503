// aes_dec_round: the decryptor's combinational round function.
//
// The registered state is XORed with the current round key; that sum is the
// plaintext tap (after the last round it is the recovered plaintext). Except
// on the first round, the sum goes through InvMixColumns; then through
// InvShiftRows and InvSubBytes, and the result is fed back to the state
// register. The order of the steps and the first-round bypass follow the
// decryptor's internal signals (inv_mixcol_input/output, invsr_input,
// invsb_input, feedback, is_first_round).
//
// Ports: state_in and round_key (128 bits each), first_round (1 = skip
// InvMixColumns); added (state_in ^ round_key) and next_state. No clock.
module aes_dec_round
  import aes_pkg::*;
(
  input  aes_block_t state_in,
  input  aes_key_t   round_key,
  input  logic       first_round,
  output aes_block_t added,
  output aes_block_t next_state
);
  aes_block_t imc_out, isr_in, isb_in;

  always_comb added = state_in ^ round_key;

  aes_inv_mix_columns u_imc (.in_state(added), .out_state(imc_out));

  always_comb isr_in = first_round ? added : imc_out;

  aes_inv_shift_rows u_isr (.in_state(isr_in), .out_state(isb_in));
  aes_inv_sub_bytes  u_isb (.in_state(isb_in), .out_state(next_state));
endmodule
