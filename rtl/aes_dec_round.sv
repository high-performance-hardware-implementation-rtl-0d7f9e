// aes_dec_round: one AES decryption round of the straight inverse cipher,
// fully combinational.
//
//   InvShiftRows  : wiring, row r rotated right by r bytes
//   InvSubBytes   : 16 inverse S-box tables
//   AddRoundKey   : XOR with round_key (the unmodified encryption key of
//                   this round)
//   InvMixColumns : four column units in parallel (skipped when last = 1)
//
// The iterative decryptor applies this once per clock cycle, with round keys
// taken in reverse order from the round-key memory.
//
// Ports: state_in, round_key, last, state_out. Using the straight inverse
// cipher (rather than the equivalent inverse cipher with transformed keys)
// is this RTL's choice; it lets the key memory hold the plain round keys.
module aes_dec_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  input  logic   last,
  output block_t state_out
);

  block_t shf, sub, ark, mix;

  assign shf = inv_shift_rows(state_in);

  for (genvar i = 0; i < 16; i++) begin : g_isbox
    aes_inv_sbox u_isbox (.a(shf[127-8*i -: 8]), .y(sub[127-8*i -: 8]));
  end

  assign ark = sub ^ round_key;

  for (genvar c = 0; c < 4; c++) begin : g_imix
    aes_inv_mix_column u_imix (.col_in(ark[127-32*c -: 32]), .col_out(mix[127-32*c -: 32]));
  end

  assign state_out = last ? ark : mix;

endmodule
