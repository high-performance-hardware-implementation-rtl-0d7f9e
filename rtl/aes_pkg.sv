// aes_pkg: types and constant functions shared by the AES-128 cores.
//
// The 128-bit state uses the byte order of the AES standard: byte i of the
// vector sits in bits [127-8i -: 8] and holds row i%4, column i/4 of the 4x4
// state array. A column is a 32-bit word with row 0 in its top byte.
//
// The functions here are used at elaboration time to fill the ROMs
// (S-box, inverse S-box, constant-multiplier tables) and for the pure
// wiring permutations ShiftRows / InvShiftRows. The S-box is derived from its
// definition (GF(2^8) multiplicative inverse, then the affine transform);
// the tables themselves are ROMs.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;


  // Multiply by x in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product (shift-and-add).
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  typedef byte_t rom256_t [256];

  // Affine transform of the S-box: s_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6)
  // ^ b_(i+7) ^ c_i with c = 0x63.
  function automatic byte_t affine(input byte_t b);
    byte_t s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  // Whole S-box table. The multiplicative inverse comes from exponent and
  // logarithm tables over the generator {03}: inv(g^k) = g^(255-k);
  // 0 has no inverse and maps to 0.
  function automatic rom256_t sbox_table();
    rom256_t t;
    byte_t   exp_t [256];
    byte_t   log_t [256];
    byte_t   x = 8'h01;
    for (int k = 0; k < 255; k++) begin
      exp_t[k] = x;
      log_t[x] = byte_t'(k);
      x = x ^ xtime(x);          // multiply by {03}
    end
    t[0] = affine(8'h00);
    for (int i = 1; i < 256; i++)
      t[i] = affine(exp_t[(255 - int'(log_t[i])) % 255]);
    return t;
  endfunction

  // Round constant for key-expansion step r (1..10).
  // rcon(r) = x^(r-1) in GF(2^8); the loop has a fixed bound so that it
  // unrolls into a small mux when r is not a constant.
  function automatic byte_t rcon(input int unsigned r);
    byte_t c = 8'h01;
    for (int unsigned i = 1; i < 14; i++)
      if (i < r) c = xtime(c);
    return c;
  endfunction

  function automatic byte_t get_byte(input block_t s, input int unsigned i);
    return s[127-8*i -: 8];
  endfunction

  // ShiftRows: row r rotates left by r columns.
  // out[r][c] = in[r][(c+r)%4]
  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = s[127-8*(4*((c+r)%4)+r) -: 8];
    return o;
  endfunction

  // InvShiftRows: row r rotates right by r columns.
  function automatic block_t inv_shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*((c+r)%4)+r) -: 8] = s[127-8*(4*c+r) -: 8];
    return o;
  endfunction

endpackage
