// aes_inv_sbox: the inverse AES S-box, purely combinational.
//
// Undoes aes_sbox: the inverse affine map (constant 0x05) followed by the
// multiplicative inverse in GF(2^8). Sixteen of these form the decryptor's
// inverse byte substitution; the decryptor's backward key schedule uses the
// forward S-box. Computing instead of storing a table is this design's choice.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  aes_byte_t in_byte,
  output aes_byte_t out_byte
);
  always_comb out_byte = gf_inv(inv_affine(in_byte));
endmodule
