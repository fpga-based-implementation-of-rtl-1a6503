// aes_inv_shift_rows: InvShiftRows, the decryptor's row rotation; wiring only.
//
// Row r of the column-major 4x4 byte matrix is rotated right by r positions:
// out[r][c] = in[r][(c-r) mod 4]. Combinational.
module aes_inv_shift_rows
  import aes_pkg::*;
(
  input  aes_block_t in_state,
  output aes_block_t out_state
);
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        out_state[8*(r + 4*c) +: 8] = in_state[8*(r + 4*((c + 4 - r) % 4)) +: 8];
  end
endmodule
