// aes_sub_bytes: the Byte Substitution Layer, sixteen S-boxes side by side.
//
// Every byte of the 128-bit state goes through its own aes_sbox; there is no
// sharing and no register, so a whole round's substitution happens in one
// clock. Combinational, 128 bits in, 128 bits out.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  aes_block_t in_state,
  output aes_block_t out_state
);
  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox u_sbox (.in_byte(in_state[8*i +: 8]), .out_byte(out_state[8*i +: 8]));
  end
endmodule
