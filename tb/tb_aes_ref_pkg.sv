// tb_aes_ref_pkg: a behavioural reference model of dual-key AES-128 for the testbenches.
//
// It is written independently of the RTL: the S-byte uses the bitwise affine formula of
// FIPS-197 with the key byte as the affine constant, the field inverse is found by search,
// the inverse S-byte by searching the forward one, and the state is kept as a 4x4 byte array.
// Known-answer vectors in the testbenches check this model too.
package tb_aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] blk;
  typedef u8            st_t [4][4];   // [row][column]

  function automatic u8 r_mul(u8 a, u8 b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction

  // Inverses are found by search once and then remembered.
  u8  inv_tab [256];
  bit inv_tab_ok = 1'b0;

  function automatic u8 r_inv(u8 a);
    if (!inv_tab_ok) begin
      inv_tab[0] = 8'h00;
      for (int v = 1; v < 256; v++)
        for (int x = 1; x < 256; x++)
          if (r_mul(u8'(v), u8'(x)) == 8'h01) inv_tab[v] = u8'(x);
      inv_tab_ok = 1'b1;
    end
    return inv_tab[a];
  endfunction

  function automatic u8 r_sbox(u8 x, u8 c);
    u8 b = r_inv(x);
    u8 o;
    for (int i = 0; i < 8; i++)
      o[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ c[i];
    return o;
  endfunction

  function automatic u8 r_isbox(u8 y, u8 c);
    for (int x = 0; x < 256; x++) if (r_sbox(u8'(x), c) == y) return u8'(x);
    return 8'h00;
  endfunction

  function automatic st_t to_st(blk b);
    st_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) s[r][c] = b[127 - 8*(4*c + r) -: 8];
    return s;
  endfunction

  function automatic blk from_st(st_t s);
    blk b;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) b[127 - 8*(4*c + r) -: 8] = s[r][c];
    return b;
  endfunction

  function automatic blk r_shift_rows(blk b, bit inv);
    st_t s = to_st(b);
    st_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) o[r][c] = s[r][(c + r) % 4];
        else      o[r][(c + r) % 4] = s[r][c];
    return from_st(o);
  endfunction

  function automatic blk r_mix_columns(blk b, bit inv);
    st_t s = to_st(b);
    st_t o;
    u8 m [4];
    if (!inv) m = '{8'h02, 8'h03, 8'h01, 8'h01};
    else      m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[r][c] = r_mul(m[0], s[r][c]) ^ r_mul(m[1], s[(r+1)%4][c]) ^
                  r_mul(m[2], s[(r+2)%4][c]) ^ r_mul(m[3], s[(r+3)%4][c]);
    return from_st(o);
  endfunction

  function automatic blk r_sub_bytes(blk b, blk k, bit inv, bit keyed);
    blk o;
    for (int i = 0; i < 16; i++) begin
      u8 c = keyed ? k[127-8*i -: 8] : 8'h63;
      o[127-8*i -: 8] = inv ? r_isbox(b[127-8*i -: 8], c) : r_sbox(b[127-8*i -: 8], c);
    end
    return o;
  endfunction

  function automatic blk r_key_next(blk k, int r);
    logic [31:0] w [4];
    logic [31:0] t;
    u8 rc = 8'h01;
    for (int i = 1; i < r; i++) rc = r_mul(rc, 8'h02);
    for (int i = 0; i < 4; i++) w[i] = k[127-32*i -: 32];
    t = {r_sbox(w[3][23:16], 8'h63) ^ rc, r_sbox(w[3][15:8], 8'h63),
         r_sbox(w[3][7:0], 8'h63), r_sbox(w[3][31:24], 8'h63)};
    w[0] ^= t; w[1] ^= w[0]; w[2] ^= w[1]; w[3] ^= w[2];
    return {w[0], w[1], w[2], w[3]};
  endfunction

  // 16 stored keys: byte b of key j is the standard S-box of 15*j + b.
  function automatic blk r_system_key(u8 seed);
    logic [3:0] off = seed[7:4] ^ seed[3:0];
    int j = int'(off);
    blk k;
    for (int b = 0; b < 15; b++) k[127-8*b -: 8] = r_sbox(u8'(15*j + b), 8'h63);
    k[7:0] = seed;
    return k;
  endfunction

  function automatic blk r_encrypt(blk pt, blk key, blk sk, bit keyed);
    blk s = pt ^ key;
    blk rk = key;
    blk k = sk;
    for (int r = 1; r <= 10; r++) begin
      rk = r_key_next(rk, r);
      if (r > 1) k ^= rk;
      s = r_sub_bytes(s, k, 1'b0, keyed);
      s = r_shift_rows(s, 1'b0);
      if (r < 10) s = r_mix_columns(s, 1'b0);
      s ^= rk;
    end
    return s;
  endfunction

  function automatic blk r_decrypt(blk ct, blk key, blk sk, bit keyed);
    blk rks [11];
    blk sks [11];
    blk s = ct;
    rks[0] = key;
    sks[1] = sk;
    for (int r = 1; r <= 10; r++) rks[r] = r_key_next(rks[r-1], r);
    for (int r = 2; r <= 10; r++) sks[r] = sks[r-1] ^ rks[r];
    for (int r = 10; r >= 1; r--) begin
      s ^= rks[r];
      if (r < 10) s = r_mix_columns(s, 1'b1);
      s = r_shift_rows(s, 1'b1);
      s = r_sub_bytes(s, sks[r], 1'b1, keyed);
    end
    return s ^ rks[0];
  endfunction

endpackage
