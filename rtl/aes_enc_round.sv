// aes_enc_round: one AES encryption round, fully combinational.
//
//   SubBytes   : 16 S-box tables, one per state byte
//   ShiftRows  : wiring, row r rotated left by r bytes
//   MixColumns : four column units in parallel (skipped when last = 1)
//   AddRoundKey: XOR with round_key
//
// The iterative encryptor applies this once per clock cycle. The state byte
// order is that of the AES standard (see aes_pkg).
//
// Ports: state_in, round_key, last (final round without MixColumns),
// state_out. The step order is AES itself; the one-round-per-cycle use and
// the table-based steps follow the architecture, the per-column split of the
// mixing step is this RTL's choice.
module aes_enc_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  input  logic   last,
  output block_t state_out
);

  block_t sub, shf, mix;

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox u_sbox (.a(state_in[127-8*i -: 8]), .y(sub[127-8*i -: 8]));
  end

  assign shf = shift_rows(sub);

  for (genvar c = 0; c < 4; c++) begin : g_mix
    aes_mix_column u_mix (.col_in(shf[127-32*c -: 32]), .col_out(mix[127-32*c -: 32]));
  end

  assign state_out = (last ? shf : mix) ^ round_key;

endmodule
