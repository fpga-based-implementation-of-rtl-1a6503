// aes_inv_sub_bytes: inverse byte substitution, sixteen inverse S-boxes.
//
// Each byte of the 128-bit state goes through its own aes_inv_sbox.
// Combinational, 128 bits in, 128 bits out.
module aes_inv_sub_bytes
  import aes_pkg::*;
(
  input  aes_block_t in_state,
  output aes_block_t out_state
);
  for (genvar i = 0; i < 16; i++) begin : g_inv_sbox
    aes_inv_sbox u_inv_sbox (.in_byte(in_state[8*i +: 8]), .out_byte(out_state[8*i +: 8]));
  end
endmodule
