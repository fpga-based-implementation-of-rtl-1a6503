// aes_enc_ctrl: round controller of the iterative encryptor.
//
// There is no round counter. An 8-bit register holds the round constant RC:
// a clock edge with rst low loads 0x01, and every later edge multiplies it
// by x in GF(2^8) (0x01, 0x02, ..., 0x80, 0x1b, 0x36, 0x6c). The same RC
// feeds the key schedule. Two comparators decode it: RC == 0x36 is the final
// round (MixColumns is skipped) and RC == 0x6c is done, ten clocks after the
// load. The register, the 0x01 reset value, the multiply-by-x feedback and
// both comparators follow the architecture. rst is a synchronous load,
// active low as in the decryptor's published waveform. Holding RC once done
// is reached, so that done and the ciphertext stay valid until the next
// load, is this design's addition.
//
// Outputs rc, final_round and done are combinational decodes of the register.
module aes_enc_ctrl
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  output aes_byte_t rc,
  output logic      final_round,
  output logic      done
);
  aes_byte_t rc_q;

  always_ff @(posedge clk) begin
    if (!rst)       rc_q <= ENC_RC_INIT;
    else if (!done) rc_q <= xtime(rc_q);
  end

  always_comb begin
    rc          = rc_q;
    final_round = (rc_q == ENC_RC_FINAL);
    done        = (rc_q == ENC_RC_DONE);
  end

  // After a load the first round uses RC 0x01.
  a_load : assert property (@(posedge clk) !rst |=> rc_q == ENC_RC_INIT);
  // done rises exactly NUM_ROUNDS clocks after the load edge, not earlier.
  a_early   : assert property (@(posedge clk) !rst ##1 rst [*1:NUM_ROUNDS] |-> !done);
  a_latency : assert property (@(posedge clk) !rst ##1 rst [*NUM_ROUNDS] |=> done);
  // Once done, RC stays put until the next load.
  a_hold : assert property (@(posedge clk) disable iff (!rst) done |=> done);
endmodule
