// aes_ref_pkg: reference models for the testbenches, written directly from
// the AES definition in the ordinary polynomial basis, plus conversion to
// and from the normal basis generated by alpha = {33} (bit i of a
// normal-basis byte is the coefficient of alpha^(2^i)). Nothing here is
// shared with the RTL, so the checks are independent of it.
package aes_ref_pkg;

  typedef logic [7:0] byte_t;

  // Product in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1B) : (a << 1);
    end
    return r;
  endfunction

  function automatic byte_t ginv(byte_t a);   // a^254, 0 -> 0
    byte_t r = 8'h01;
    for (int i = 0; i < 254; i++) r = gmul(r, a);
    return (a == 0) ? 8'h00 : r;
  endfunction

  function automatic byte_t affine(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  function automatic byte_t inv_affine(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[(i+2)%8] ^ b[(i+5)%8] ^ b[(i+7)%8];
    return r ^ 8'h05;
  endfunction

  function automatic byte_t sbox(byte_t x);
    return affine(ginv(x));
  endfunction

  // Normal-basis element alpha^(2^i) in the polynomial basis.
  function automatic byte_t nb_elem(int i);
    byte_t e = 8'h33;
    for (int k = 0; k < i; k++) e = gmul(e, e);
    return e;
  endfunction

  function automatic byte_t n2p(byte_t n);
    byte_t r = 0;
    for (int i = 0; i < 8; i++) if (n[i]) r ^= nb_elem(i);
    return r;
  endfunction

  function automatic byte_t p2n(byte_t p);
    for (int n = 0; n < 256; n++)
      if (n2p(byte_t'(n)) == p) return byte_t'(n);
    return 8'h00;
  endfunction

  // Whole 128-bit blocks (AES byte order, byte n at bits 127-8n).
  function automatic logic [127:0] blk_p2n(logic [127:0] v);
    logic [127:0] r;
    for (int n = 0; n < 16; n++) r[127-8*n -: 8] = p2n(v[127-8*n -: 8]);
    return r;
  endfunction
  function automatic logic [127:0] blk_n2p(logic [127:0] v);
    logic [127:0] r;
    for (int n = 0; n < 16; n++) r[127-8*n -: 8] = n2p(v[127-8*n -: 8]);
    return r;
  endfunction

  typedef byte_t state_t [4][4];   // [row][column]

  function automatic state_t to_state(logic [127:0] v);
    state_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) s[r][c] = v[127 - 8*(4*c + r) -: 8];
    return s;
  endfunction
  function automatic logic [127:0] from_state(state_t s);
    logic [127:0] v;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) v[127 - 8*(4*c + r) -: 8] = s[r][c];
    return v;
  endfunction

  // One step of the AES-128 key schedule: round key k from round key k-1.
  function automatic logic [127:0] key_step(logic [127:0] k, int rnd);
    state_t w = to_state(k);      // w[r][j] = byte r of word j
    state_t n;
    byte_t  rc = 8'h01;
    for (int i = 1; i < rnd; i++) rc = gmul(rc, 8'h02);
    for (int r = 0; r < 4; r++)
      n[r][0] = w[r][0] ^ sbox(w[(r+1)%4][3]) ^ ((r == 0) ? rc : 8'h00);
    for (int j = 1; j < 4; j++)
      for (int r = 0; r < 4; r++) n[r][j] = w[r][j] ^ n[r][j-1];
    return from_state(n);
  endfunction

  function automatic logic [127:0] last_round_key(logic [127:0] k);
    for (int i = 1; i <= 10; i++) k = key_step(k, i);
    return k;
  endfunction

  function automatic state_t mix_columns(state_t s, bit inv);
    state_t o;
    byte_t  m0, m1, m2, m3;
    if (inv) begin m0 = 8'h0E; m1 = 8'h0B; m2 = 8'h0D; m3 = 8'h09; end
    else     begin m0 = 8'h02; m1 = 8'h03; m2 = 8'h01; m3 = 8'h01; end
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[r][c] = gmul(m0, s[r][c]) ^ gmul(m1, s[(r+1)%4][c]) ^
                  gmul(m2, s[(r+2)%4][c]) ^ gmul(m3, s[(r+3)%4][c]);
    return o;
  endfunction

  // FIPS-197 encryption of one block (polynomial basis).
  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [127:0] key);
    state_t s = to_state(pt ^ key);
    state_t t;
    for (int rnd = 1; rnd <= 10; rnd++) begin
      key = key_step(key, rnd);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) t[r][c] = sbox(s[r][(c + r) % 4]);
      if (rnd != 10) t = mix_columns(t, 1'b0);
      s = to_state(from_state(t) ^ key);
    end
    return from_state(s);
  endfunction

endpackage
