// aes_mix_columns: the MixColumns step of the diffusion layer.
//
// Each of the four columns (a0..a3, a_r = byte r+4c) is multiplied in
// GF(2^8) by the circulant matrix [2 3 1 1]:
//   b_r = 2*a_r ^ 3*a_(r+1) ^ a_(r+2) ^ a_(r+3)   (indices mod 4)
// where 2*a is xtime(a) and 3*a is xtime(a)^a. Combinational.
module aes_mix_columns
  import aes_pkg::*;
(
  input  aes_block_t in_state,
  output aes_block_t out_state
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        aes_byte_t a0, a1, a2, a3;
        a0 = in_state[8*(4*c + r) +: 8];
        a1 = in_state[8*(4*c + (r + 1) % 4) +: 8];
        a2 = in_state[8*(4*c + (r + 2) % 4) +: 8];
        a3 = in_state[8*(4*c + (r + 3) % 4) +: 8];
        out_state[8*(4*c + r) +: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      end
    end
  end
endmodule
