// aes_shift_rows: the ShiftRows step of the diffusion layer; wiring only.
//
// The state is a 4x4 byte matrix filled column by column (byte r+4c is row r,
// column c). Row r is rotated left by r positions:
// out[r][c] = in[r][(c+r) mod 4]. Combinational.
module aes_shift_rows
  import aes_pkg::*;
(
  input  aes_block_t in_state,
  output aes_block_t out_state
);
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        out_state[8*(r + 4*c) +: 8] = in_state[8*(r + 4*((c + r) % 4)) +: 8];
  end
endmodule
