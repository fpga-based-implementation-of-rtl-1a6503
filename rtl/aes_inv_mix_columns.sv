// aes_inv_mix_columns: InvMixColumns, the decryptor's column mixing.
//
// Each column is multiplied in GF(2^8) by the circulant matrix
// [0e 0b 0d 09], the inverse of MixColumns' [02 03 01 01]:
//   b_r = 0e*a_r ^ 0b*a_(r+1) ^ 0d*a_(r+2) ^ 09*a_(r+3)   (indices mod 4)
// Combinational.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  aes_block_t in_state,
  output aes_block_t out_state
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        out_state[8*(4*c + r) +: 8] =
            gf_mul(in_state[8*(4*c + r) +: 8],           8'h0e)
          ^ gf_mul(in_state[8*(4*c + (r + 1) % 4) +: 8], 8'h0b)
          ^ gf_mul(in_state[8*(4*c + (r + 2) % 4) +: 8], 8'h0d)
          ^ gf_mul(in_state[8*(4*c + (r + 3) % 4) +: 8], 8'h09);
      end
    end
  end
endmodule
