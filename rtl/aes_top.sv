// aes_top: the AES-128 encryptor and decryptor side by side.
//
// The two cores share only the clock; each has its own synchronous,
// active-low load (enc_rst, dec_rst), its own 128-bit inputs and outputs and its own done.
// The encryptor takes a plaintext and the cipher key; the decryptor takes a
// ciphertext and the last round key (round 10 of the same key schedule).
// Both produce a result ten clocks after the load and hold it, with done
// high, until the next load. 128 x 3 data bits plus clock, load and done
// make 387 pins per core.
module aes_top
  import aes_pkg::*;
(
  input  logic       clk,
  // encryptor
  input  logic       enc_rst,
  input  aes_block_t enc_datain,
  input  aes_key_t   enc_key,
  output aes_block_t enc_dataout,
  output logic       enc_done,
  // decryptor
  input  logic       dec_rst,
  input  aes_block_t dec_ciphertext,
  input  aes_key_t   dec_key,
  output aes_block_t dec_plaintext,
  output logic       dec_done
);
  aes_enc u_enc (
    .clk(clk), .rst(enc_rst), .datain(enc_datain), .key(enc_key),
    .dataout(enc_dataout), .done(enc_done)
  );

  aes_dec u_dec (
    .clk(clk), .rst(dec_rst), .ciphertext(dec_ciphertext), .dec_key(dec_key),
    .plaintext(dec_plaintext), .done(dec_done)
  );
endmodule
