// aes_inv_key_round: one backward round of the AES-128 key schedule.
//
// Given round key i and the round constant that produced it, returns round
// key i-1, which lets the decryptor start from the last round key and walk
// back to the cipher key on the fly:
//   w3 = w3' ^ w2',  w2 = w2' ^ w1',  w1 = w1' ^ w0',  w0 = w0' ^ F(w3, rc)
// The decryptor's structure (last round key in, round constant counting
// down) follows its published waveform; the word equations are the forward
// round solved backwards. Combinational.
module aes_inv_key_round
  import aes_pkg::*;
(
  input  aes_key_t   key_in,
  input  aes_byte_t  rc,
  output aes_key_t   key_out
);
  aes_word_t f_out;
  aes_word_t w1, w2, w3;

  always_comb begin
    w3 = key_in[127:96] ^ key_in[95:64];
    w2 = key_in[95:64]  ^ key_in[63:32];
    w1 = key_in[63:32]  ^ key_in[31:0];
  end

  aes_key_f u_f (.in_word(w3), .rc(rc), .out_word(f_out));

  always_comb key_out = {w3, w2, w1, key_in[31:0] ^ f_out};
endmodule
