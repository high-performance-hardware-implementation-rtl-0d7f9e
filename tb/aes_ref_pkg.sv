// aes_ref_pkg: reference model of AES-128 for the testbenches.
//
// Written independently of the RTL: the S-box entry is the affine map of
// a^254 (the inverse by exponentiation, not by search), the affine map is
// the rotate form s = b ^ rol1(b) ^ rol2(b) ^ rol3(b) ^ rol4(b) ^ 0x63,
// MixColumns is the textbook row/column form. Call ref_init() once before use.
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] u128;

  u8 SB  [256];
  u8 ISB [256];

  function automatic u8 mul(u8 a, u8 b);
    u8 p = 0;
    while (a != 0) begin
      if (a[0]) p ^= b;
      b = b[7] ? ((b << 1) ^ 8'h1b) : (b << 1);
      a = a >> 1;
    end
    return p;
  endfunction

  function automatic u8 rol(u8 b, int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic u8 calc_sbox(u8 a);
    u8 r = 1;
    u8 b;
    // a^254 = a^-1 in GF(2^8)
    for (int i = 0; i < 254; i++) r = mul(r, a);
    b = (a == 0) ? 8'h00 : r;
    return b ^ rol(b, 1) ^ rol(b, 2) ^ rol(b, 3) ^ rol(b, 4) ^ 8'h63;
  endfunction

  function automatic void ref_init();
    for (int i = 0; i < 256; i++) begin
      SB[i] = calc_sbox(u8'(i));
      ISB[SB[i]] = u8'(i);
    end
  endfunction

  // Byte at row r, column c of a state vector.
  function automatic u8 gb(u128 v, int r, int c);
    return v[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic u128 mixcol(u128 v, bit inv);
    u128 o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (!inv)
          o[127 - 8*(4*c + r) -: 8] = mul(2, gb(v, r, c)) ^ mul(3, gb(v, (r+1)%4, c))
                                    ^ gb(v, (r+2)%4, c) ^ gb(v, (r+3)%4, c);
        else
          o[127 - 8*(4*c + r) -: 8] = mul(14, gb(v, r, c)) ^ mul(11, gb(v, (r+1)%4, c))
                                    ^ mul(13, gb(v, (r+2)%4, c)) ^ mul(9, gb(v, (r+3)%4, c));
    return o;
  endfunction

  // SubBytes then ShiftRows: out[r][c] = S(in[r][(c+r)%4])
  function automatic u128 subshift(u128 v);
    u128 o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127 - 8*(4*c + r) -: 8] = SB[gb(v, r, (c + r) % 4)];
    return o;
  endfunction

  function automatic u128 inv_subshift(u128 v);
    u128 o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127 - 8*(4*((c + r) % 4) + r) -: 8] = ISB[gb(v, r, c)];
    return o;
  endfunction

  function automatic u128 next_key(u128 k, int round);
    logic [31:0] w [8];
    logic [31:0] t;
    u8 rc = 1;
    for (int i = 1; i < round; i++) rc = mul(rc, 2);
    for (int i = 0; i < 4; i++) w[i] = k[127 - 32*i -: 32];
    t = {SB[w[3][23:16]], SB[w[3][15:8]], SB[w[3][7:0]], SB[w[3][31:24]]} ^ {rc, 24'h0};
    for (int i = 4; i < 8; i++) begin
      w[i] = w[i-4] ^ ((i == 4) ? t : w[i-1]);
    end
    return {w[4], w[5], w[6], w[7]};
  endfunction

  function automatic u128 enc_round(u128 s, u128 k, bit last);
    u128 t = subshift(s);
    if (!last) t = mixcol(t, 0);
    return t ^ k;
  endfunction

  function automatic u128 dec_round(u128 s, u128 k, bit last);
    u128 t = inv_subshift(s) ^ k;
    if (!last) t = mixcol(t, 1);
    return t;
  endfunction

  function automatic u128 encrypt(u128 key, u128 pt);
    u128 k = key;
    u128 s = pt ^ key;
    for (int r = 1; r <= 10; r++) begin
      k = next_key(k, r);
      s = enc_round(s, k, r == 10);
    end
    return s;
  endfunction

  function automatic u128 decrypt(u128 key, u128 ct);
    u128 rk [11];
    u128 s;
    rk[0] = key;
    for (int r = 1; r <= 10; r++) rk[r] = next_key(rk[r-1], r);
    s = ct ^ rk[10];
    for (int r = 1; r <= 10; r++) s = dec_round(s, rk[10 - r], r == 10);
    return s;
  endfunction

  function automatic u128 rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
