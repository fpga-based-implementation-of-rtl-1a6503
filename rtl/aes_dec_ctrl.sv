// aes_dec_ctrl: round controller of the iterative decryptor.
//
// An 8-bit round-constant register steps backwards through the AES round
// constants: a clock edge with rst low loads 0x36, and each later edge
// divides by x (0x36, 0x1b, 0x80, 0x40, ..., 0x02, 0x01, 0x00). RC == 0x00
// is done, ten clocks after the load. A one-bit flag is set by the load and
// cleared by the next edge: it marks the first round, on which InvMixColumns
// is skipped. This sequence and the first-round flag follow the decryptor's
// waveform, and so does the load polarity (rst low selects the new
// ciphertext). A synchronous load, and holding once done, are this design's
// choices.
//
// Outputs rc and first_round come straight from the registers; done is a
// compare of RC with 0x00.
module aes_dec_ctrl
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  output aes_byte_t rc,
  output logic      first_round,
  output logic      done
);
  aes_byte_t rc_q;
  logic      first_q;

  always_ff @(posedge clk) begin
    if (!rst) begin
      rc_q    <= DEC_RC_INIT;
      first_q <= 1'b1;
    end else if (!done) begin
      rc_q    <= rc_step_back(rc_q);
      first_q <= 1'b0;
    end
  end

  always_comb begin
    rc          = rc_q;
    first_round = first_q;
    done        = (rc_q == DEC_RC_DONE);
  end

  a_load    : assert property (@(posedge clk) !rst |=> rc_q == DEC_RC_INIT && first_q);
  a_early   : assert property (@(posedge clk) !rst ##1 rst [*1:NUM_ROUNDS] |-> !done);
  a_latency : assert property (@(posedge clk) !rst ##1 rst [*NUM_ROUNDS] |=> done);
  a_hold    : assert property (@(posedge clk) disable iff (!rst) done |=> done);
endmodule
