// aes_key_round: one forward round of the AES-128 key schedule.
//
// Splits the round key into words w0 (bits 31..0) .. w3 (bits 127..96).
// F of the top word w3 is XORed into w0, and each new word is then XORed
// into the next one along:
//   w0' = w0 ^ F(w3, rc),  w1' = w1 ^ w0',  w2' = w2 ^ w1',  w3' = w3 ^ w2'
// This is the XOR chain of the key-schedule round, evaluated once per clock
// to produce the next sub-key on the fly. Combinational.
module aes_key_round
  import aes_pkg::*;
(
  input  aes_key_t   key_in,
  input  aes_byte_t  rc,
  output aes_key_t   key_out
);
  aes_word_t f_out;
  aes_word_t w0, w1, w2, w3;

  aes_key_f u_f (.in_word(key_in[127:96]), .rc(rc), .out_word(f_out));

  always_comb begin
    w0 = key_in[31:0]   ^ f_out;
    w1 = key_in[63:32]  ^ w0;
    w2 = key_in[95:64]  ^ w1;
    w3 = key_in[127:96] ^ w2;
    key_out = {w3, w2, w1, w0};
  end
endmodule
