// aes_key_round: one step of AES-128 key expansion, combinational.
//
// From the previous round key w[i-4..i-1] it forms the next one:
//   t      = SubWord(RotWord(w[i-1])) ^ {rc, 00, 00, 00}
//   w[i]   = w[i-4] ^ t
//   w[i+1] = w[i-3] ^ w[i]   ... and so on (each word XORs the previous)
// RotWord turns [a0 a1 a2 a3] into [a1 a2 a3 a0]; SubWord uses four S-box
// tables. Only the 128-bit key length (Nk = 4) is built.
//
// Ports: key_in (round key i-1, word 0 in bits 127:96), rc (round
// constant of this step), key_out (round key i). Combinational; the three
// steps (sub word, rot word, XOR chain) follow the key schedule as specified,
// restricting it to 128-bit keys is the scope of this design.
module aes_key_round
  import aes_pkg::*;
(
  input  block_t key_in,
  input  byte_t  rc,
  output block_t key_out
);

  word_t w [4];
  word_t rot, sub, t;
  word_t n [4];

  for (genvar i = 0; i < 4; i++) begin : g_words
    assign w[i] = key_in[127-32*i -: 32];
    assign key_out[127-32*i -: 32] = n[i];
  end

  assign rot = {w[3][23:0], w[3][31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_subword
    aes_sbox u_sbox (.a(rot[31-8*i -: 8]), .y(sub[31-8*i -: 8]));
  end

  assign t    = sub ^ {rc, 24'h0};
  assign n[0] = w[0] ^ t;
  assign n[1] = w[1] ^ n[0];
  assign n[2] = w[2] ^ n[1];
  assign n[3] = w[3] ^ n[2];

endmodule
