// aes_key_f: the key schedule's F function on one 32-bit word.
//
// The word's four bytes are rotated by one byte position (RotWord: byte 1
// moves to byte 0, byte 0 to byte 3), each passes through an S-box, and the
// round constant is XORed into byte 0:
//   F(w) = SubWord(RotWord(w)) ^ {24'h0, rc}
// The byte crossover and the four S boxes follow the F block of the
// key-schedule round; where the round constant enters F is not drawn and is
// placed at byte 0 as AES defines. Combinational.
module aes_key_f
  import aes_pkg::*;
(
  input  aes_word_t in_word,
  input  aes_byte_t rc,
  output aes_word_t out_word
);
  aes_word_t rot, sub;

  always_comb rot = {in_word[7:0], in_word[31:8]};

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox u_sbox (.in_byte(rot[8*i +: 8]), .out_byte(sub[8*i +: 8]));
  end

  always_comb out_word = sub ^ {24'h0, rc};
endmodule
