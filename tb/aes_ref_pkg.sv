// aes_ref_pkg: a plain behavioural AES-128 reference for the testbenches.
//
// Written independently of the RTL: the state is an array of 16 bytes in
// FIPS-197 order, the S-box is found by brute-force search for the
// multiplicative inverse followed by the affine map written bit by bit, and
// the key schedule is expanded in full up front. Blocks are converted to and
// from the RTL's packing (AES byte i in bits [8i+7:8i]) at the edges.
package aes_ref_pkg;

  typedef logic [7:0] byte_arr_t [16];

  function automatic logic [7:0] ref_mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] ref_inv(input logic [7:0] a);
    if (a == 0) return 8'h00;
    for (int y = 1; y < 256; y++) if (ref_mul(a, 8'(y)) == 8'h01) return 8'(y);
    return 8'h00;
  endfunction

  // S-box tables, built once on first use.
  logic [7:0] sbox_tab [256];
  logic [7:0] inv_sbox_tab [256];
  bit         tab_ready = 1'b0;

  function automatic logic [7:0] ref_affine(input logic [7:0] b);
    logic [7:0] s;
    logic [7:0] c;
    c = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8] ^ c[i];
    return s;
  endfunction

  function automatic void build_tables();
    for (int a = 0; a < 256; a++) begin
      logic [7:0] s;
      s = ref_affine(ref_inv(8'(a)));
      sbox_tab[a]     = s;
      inv_sbox_tab[s] = 8'(a);
    end
    tab_ready = 1'b1;
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    if (!tab_ready) build_tables();
    return sbox_tab[a];
  endfunction

  function automatic logic [7:0] ref_inv_sbox(input logic [7:0] a);
    if (!tab_ready) build_tables();
    return inv_sbox_tab[a];
  endfunction

  function automatic byte_arr_t to_arr(input logic [127:0] v);
    byte_arr_t r;
    for (int i = 0; i < 16; i++) r[i] = v[8*i +: 8];
    return r;
  endfunction

  function automatic logic [127:0] from_arr(input byte_arr_t r);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[8*i +: 8] = r[i];
    return v;
  endfunction

  // Conventional hex string order (byte 0 first) <-> RTL packing.
  function automatic logic [127:0] byte_reverse(input logic [127:0] v);
    logic [127:0] r;
    for (int i = 0; i < 16; i++) r[8*i +: 8] = v[8*(15 - i) +: 8];
    return r;
  endfunction

  function automatic byte_arr_t ref_sub(input byte_arr_t s);
    byte_arr_t r;
    for (int i = 0; i < 16; i++) r[i] = ref_sbox(s[i]);
    return r;
  endfunction

  function automatic byte_arr_t ref_inv_sub(input byte_arr_t s);
    byte_arr_t r;
    for (int i = 0; i < 16; i++) r[i] = ref_inv_sbox(s[i]);
    return r;
  endfunction

  function automatic byte_arr_t ref_shift(input byte_arr_t s);
    byte_arr_t r;
    for (int row = 0; row < 4; row++)
      for (int col = 0; col < 4; col++)
        r[row + 4*col] = s[row + 4*((col + row) % 4)];
    return r;
  endfunction

  function automatic byte_arr_t ref_inv_shift(input byte_arr_t s);
    byte_arr_t r;
    for (int row = 0; row < 4; row++)
      for (int col = 0; col < 4; col++)
        r[row + 4*((col + row) % 4)] = s[row + 4*col];
    return r;
  endfunction

  function automatic byte_arr_t ref_mix_m(input byte_arr_t s, input logic [7:0] m[4]);
    byte_arr_t r;
    for (int col = 0; col < 4; col++)
      for (int row = 0; row < 4; row++) begin
        r[row + 4*col] = 8'h00;
        for (int k = 0; k < 4; k++)
          r[row + 4*col] ^= ref_mul(m[(k - row + 4) % 4], s[k + 4*col]);
      end
    return r;
  endfunction

  function automatic byte_arr_t ref_mix(input byte_arr_t s);
    logic [7:0] m[4] = '{8'h02, 8'h03, 8'h01, 8'h01};
    return ref_mix_m(s, m);
  endfunction

  function automatic byte_arr_t ref_inv_mix(input byte_arr_t s);
    logic [7:0] m[4] = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    return ref_mix_m(s, m);
  endfunction

  // Full key expansion: round key r (0..10) in RTL packing.
  function automatic logic [127:0] ref_round_key(input logic [127:0] key, input int r);
    logic [7:0] w [44][4];
    logic [7:0] t [4];
    logic [7:0] rcon;
    logic [127:0] out;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) w[i][j] = key[8*(4*i + j) +: 8];
    rcon = 8'h01;
    for (int i = 4; i < 44; i++) begin
      for (int j = 0; j < 4; j++) t[j] = w[i-1][j];
      if (i % 4 == 0) begin
        logic [7:0] t0;
        t0 = t[0];
        t[0] = ref_sbox(t[1]) ^ rcon;
        t[1] = ref_sbox(t[2]);
        t[2] = ref_sbox(t[3]);
        t[3] = ref_sbox(t0);
        rcon = ref_mul(rcon, 8'h02);
      end
      for (int j = 0; j < 4; j++) w[i][j] = w[i-4][j] ^ t[j];
    end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) out[8*(4*i + j) +: 8] = w[4*r + i][j];
    return out;
  endfunction

  function automatic logic [127:0] ref_encrypt(input logic [127:0] pt, input logic [127:0] key);
    byte_arr_t s;
    s = to_arr(pt ^ ref_round_key(key, 0));
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift(ref_sub(s));
      if (r != 10) s = ref_mix(s);
      s = to_arr(from_arr(s) ^ ref_round_key(key, r));
    end
    return from_arr(s);
  endfunction

  function automatic logic [127:0] ref_decrypt(input logic [127:0] ct, input logic [127:0] key);
    byte_arr_t s;
    s = to_arr(ct ^ ref_round_key(key, 10));
    for (int r = 9; r >= 0; r--) begin
      s = ref_inv_sub(ref_inv_shift(s));
      s = to_arr(from_arr(s) ^ ref_round_key(key, r));
      if (r != 0) s = ref_inv_mix(s);
    end
    return from_arr(s);
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
