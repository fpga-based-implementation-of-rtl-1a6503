// aes_enc: iterative ("loop-unrolled", depth 1) AES-128 encryptor.
//
// One AES round is built as combinational logic and used ten times. A
// 128-bit state register and a 128-bit key register sit behind two
// multiplexers: on a clock edge with rst low they load datain and key,
// afterwards they load their own feedback. Each clock the round function
// XORs the state with the key register (the sub-key), then applies SubBytes,
// ShiftRows and MixColumns (MixColumns skipped on the final round), while
// the key schedule computes the next sub-key from the key register and RC on
// the fly. The controller's RC register supplies the round constant, the
// final-round select and done.
//
// Timing: load with rst low on edge 0; done rises after edge 10 and dataout
// (= state ^ sub-key, i.e. the output of the last AddRoundKey) then holds
// the ciphertext until the next load. One block per 10 clocks; dataout is
// meaningful only while done is high. rst is a synchronous, active-low
// load (the same polarity as the decryptor's); no reset value is
// needed elsewhere because the load overwrites both registers.
//
// Byte order: AES byte i in bits [8i+7:8i] (see aes_pkg).
module aes_enc
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,      // active-low synchronous load
  input  aes_block_t datain,
  input  aes_key_t   key,
  output aes_block_t dataout,
  output logic       done
);
  aes_block_t state_q, next_state;
  aes_key_t   key_q, next_key;
  aes_byte_t  rc;
  logic       final_round;

  aes_enc_ctrl u_ctrl (
    .clk(clk), .rst(rst), .rc(rc), .final_round(final_round), .done(done)
  );

  aes_enc_round u_round (
    .state_in(state_q), .subkey(key_q), .final_round(final_round),
    .added(dataout), .next_state(next_state)
  );

  aes_key_round u_key_round (.key_in(key_q), .rc(rc), .key_out(next_key));

  always_ff @(posedge clk) begin
    if (!rst) begin
      state_q <= datain;
      key_q   <= key;
    end else if (!done) begin
      state_q <= next_state;
      key_q   <= next_key;
    end
  end
endmodule
