// aes_sbox: the AES S-box, one byte in, one byte out, purely combinational.
//
// The substitution is computed rather than looked up: the input's
// multiplicative inverse in GF(2^8) (0 maps to 0) followed by the AES affine
// map with constant 0x63. Sixteen of these form the Byte Substitution Layer
// and four more sit inside the key schedule's F function. The architecture
// only names the S box as a block; computing it instead of storing a
// 256-entry table is this design's choice.
module aes_sbox
  import aes_pkg::*;
(
  input  aes_byte_t in_byte,
  output aes_byte_t out_byte
);
  always_comb out_byte = affine(gf_inv(in_byte));
endmodule
