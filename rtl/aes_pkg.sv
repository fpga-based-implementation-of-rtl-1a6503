// aes_pkg: types, constants and GF(2^8) arithmetic shared by the AES-128
// encryptor and decryptor.
//
// Byte order. A 128-bit block holds AES byte i (FIPS-197 numbering, state
// row i%4, column i/4) in bits [8*i+7 : 8*i]. Byte 0 is therefore the least
// significant byte, so a block written as a hex literal reads as the
// conventional byte string reversed (key 2b7e1516... becomes
// 128'h...16157e2b). Word j of a round key (w0..w3) sits in bits
// [32*j+31 : 32*j], w3 in bits 127..96.
//
// The S-box is not stored as a table: it is the multiplicative inverse in
// GF(2^8) modulo x^8+x^4+x^3+x+1, computed as a^254, followed by the AES
// affine map. The round-constant values that steer the controllers (0x01,
// 0x36, 0x6c on the encrypt side; 0x36 down to 0x00 on the decrypt side) are
// the ones the iterative architecture compares against.
package aes_pkg;

  localparam int unsigned BLOCK_BITS = 128;  // AES block size
  localparam int unsigned KEY_BITS   = 128;  // AES-128 key size
  localparam int unsigned NUM_ROUNDS = 10;   // rounds of AES-128

  typedef logic [BLOCK_BITS-1:0] aes_block_t;
  typedef logic [KEY_BITS-1:0]   aes_key_t;
  typedef logic [7:0]            aes_byte_t;
  typedef logic [31:0]           aes_word_t;

  // Encryption controller: RC starts at 0x01, is multiplied by x every
  // round; 0x36 marks the final round (no MixColumns), 0x6c marks done.
  localparam aes_byte_t ENC_RC_INIT  = 8'h01;
  localparam aes_byte_t ENC_RC_FINAL = 8'h36;
  localparam aes_byte_t ENC_RC_DONE  = 8'h6c;

  // Decryption controller: RC starts at 0x36 and steps back through the
  // round constants to 0x01; the value after 0x01 is 0x00, which marks done.
  localparam aes_byte_t DEC_RC_INIT  = 8'h36;
  localparam aes_byte_t DEC_RC_DONE  = 8'h00;

  // Multiplication by x modulo x^8+x^4+x^3+x+1.
  function automatic aes_byte_t xtime(input aes_byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Step of the decrypt-side round-constant sequence: the inverse of xtime on
  // the values 0x02..0x80 and 0x1b, with 0x01 stepping to 0x00.
  function automatic aes_byte_t rc_step_back(input aes_byte_t a);
    return (a == 8'h1b) ? 8'h80 : {1'b0, a[7:1]};
  endfunction

  // General GF(2^8) product (shift-and-add).
  function automatic aes_byte_t gf_mul(input aes_byte_t a, input aes_byte_t b);
    aes_byte_t p, t;
    p = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 = a^2 * a^4 * ... * a^128 (0 maps to 0).
  function automatic aes_byte_t gf_inv(input aes_byte_t a);
    aes_byte_t sq, acc;
    sq  = gf_mul(a, a);
    acc = sq;
    for (int i = 2; i < 8; i++) begin
      sq  = gf_mul(sq, sq);
      acc = gf_mul(acc, sq);
    end
    return acc;
  endfunction

  function automatic aes_byte_t rotl8(input aes_byte_t a, input int unsigned n);
    return aes_byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic aes_byte_t affine(input aes_byte_t a);
    return a ^ rotl8(a, 1) ^ rotl8(a, 2) ^ rotl8(a, 3) ^ rotl8(a, 4) ^ 8'h63;
  endfunction

  function automatic aes_byte_t inv_affine(input aes_byte_t a);
    return rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05;
  endfunction

  function automatic aes_byte_t get_byte(input aes_block_t s, input int unsigned i);
    return s[8*i +: 8];
  endfunction

endpackage
