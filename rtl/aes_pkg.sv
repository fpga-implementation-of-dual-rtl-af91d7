// aes_pkg: types, constants and GF(2^8) arithmetic shared by the dual-key AES-128 blocks.
//
// A 128-bit block is held MSB-first: byte 0 (state row 0, column 0) is bits [127:120], and
// byte i sits in row i%4, column i/4, as in FIPS-197. All functions here are pure
// combinational arithmetic in GF(2^8) with the AES polynomial x^8+x^4+x^3+x+1 (0x11b).
//
// The key-based S-byte of this design is S_k(x) = L(x^-1) ^ k, where L is the linear part of
// the AES affine map and k is a key byte; with k = 8'h63 it is the standard AES S-box. The
// exact way the key enters the S-byte is a choice of this design: the document says only that
// the S-bytes are generated from the system key.
package aes_pkg;

  localparam int unsigned NR         = 10;      // AES-128 rounds
  localparam int unsigned BLOCK_BITS = 128;
  localparam logic [7:0]  SBOX_CONST = 8'h63;   // affine constant of the standard S-box

  typedef logic [BLOCK_BITS-1:0] block_t;
  typedef logic [7:0]            byte_t;
  typedef logic [31:0]           word_t;

  // Byte i (0 = most significant) of a block.
  function automatic byte_t get_byte(block_t b, int unsigned i);
    return b[BLOCK_BITS-1-8*i -: 8];
  endfunction

  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t acc = 8'h00;
    byte_t p   = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= p;
      p = xtime(p);
    end
    return acc;
  endfunction

  // Multiplicative inverse as a^254 (a^-1 for a != 0, and 0 for a = 0).
  function automatic byte_t gf_inv(byte_t a);
    byte_t sq  = a;
    byte_t acc = 8'h01;
    for (int i = 1; i < 8; i++) begin
      sq  = gf_mul(sq, sq);   // a^(2^i)
      acc = gf_mul(acc, sq);  // product of a^2 .. a^128 = a^254
    end
    return acc;
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  // Linear part of the AES affine transform and its inverse.
  function automatic byte_t affine_lin(byte_t b);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4);
  endfunction

  function automatic byte_t inv_affine_lin(byte_t b);
    return rotl8(b, 1) ^ rotl8(b, 3) ^ rotl8(b, 6);
  endfunction

  // Key-based S-byte and its inverse.
  function automatic byte_t keyed_sub(byte_t x, byte_t k);
    return affine_lin(gf_inv(x)) ^ k;
  endfunction

  function automatic byte_t keyed_inv_sub(byte_t y, byte_t k);
    return gf_inv(inv_affine_lin(y ^ k));
  endfunction

  // Round constant of the key expansion for round r (1..10).
  function automatic byte_t rcon(int unsigned r);
    byte_t c = 8'h01;
    for (int i = 1; i < 10; i++)
      if (i < r) c = xtime(c);
    return c;
  endfunction

  // One column of MixColumns (coefficients 02 03 01 01) and InvMixColumns (0e 0b 0d 09).
  function automatic word_t mix_column(word_t col, bit inverse);
    byte_t a [4];
    byte_t o [4];
    for (int r = 0; r < 4; r++) a[r] = col[31-8*r -: 8];
    for (int r = 0; r < 4; r++) begin
      if (!inverse)
        o[r] = gf_mul(8'h02, a[r]) ^ gf_mul(8'h03, a[(r+1)%4]) ^ a[(r+2)%4] ^ a[(r+3)%4];
      else
        o[r] = gf_mul(8'h0e, a[r]) ^ gf_mul(8'h0b, a[(r+1)%4]) ^
               gf_mul(8'h0d, a[(r+2)%4]) ^ gf_mul(8'h09, a[(r+3)%4]);
    end
    return {o[0], o[1], o[2], o[3]};
  endfunction

  // Standard S-box as a table, built at elaboration time from the formula above.
  typedef logic [255:0][7:0] sbox_table_t;

  function automatic sbox_table_t build_sbox_table();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = keyed_sub(byte_t'(i), SBOX_CONST);
    return t;
  endfunction

endpackage
