// aes_top: AES-128 encryption and decryption engine.
//
// Two independent datapaths share the cipher key input:
//  * encryption path (aes_ofb around aes_encrypt): ECB encryption or OFB
//    mode, one 128-bit block per 10 clock cycles, round keys generated on
//    the fly from the key presented with each block;
//  * decryption path (aes_decrypt): ECB decryption, one block per 10 cycles,
//    with round keys expanded once (dec_key_load, 11 cycles) into a
//    block-RAM round-key memory.
// Both paths use table lookups (ROMs) for SubBytes, InvSubBytes, MixColumns
// and InvMixColumns. OFB decryption uses the encryption path, since OFB is
// its own inverse.
//
// Interface, encryption: enc_ofb_en selects OFB (1) or ECB (0) per block;
// enc_iv_load loads enc_iv; enc_in_valid/enc_in_ready/enc_din in, one-cycle
// enc_out_valid with enc_dout out. Decryption: dec_key_load (one cycle,
// samples key), dec_key_ready; dec_in_valid/dec_in_ready/dec_din in,
// one-cycle dec_out_valid with dec_dout out. The 10-cycle cores, ROM
// tables, block-RAM decryption keys and OFB mode follow the architecture;
// running encryption and decryption as two independent paths is this RTL's
// choice.
module aes_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  block_t key,
  // encryption path
  input  logic   enc_ofb_en,
  input  logic   enc_iv_load,
  input  block_t enc_iv,
  input  logic   enc_in_valid,
  output logic   enc_in_ready,
  input  block_t enc_din,
  output logic   enc_out_valid,
  output block_t enc_dout,
  // decryption path
  input  logic   dec_key_load,
  output logic   dec_key_ready,
  input  logic   dec_in_valid,
  output logic   dec_in_ready,
  input  block_t dec_din,
  output logic   dec_out_valid,
  output block_t dec_dout
);

  aes_ofb u_enc (
    .clk(clk), .rst_n(rst_n),
    .ofb_en(enc_ofb_en), .iv_load(enc_iv_load), .iv(enc_iv), .key(key),
    .in_valid(enc_in_valid), .in_ready(enc_in_ready), .din(enc_din),
    .out_valid(enc_out_valid), .dout(enc_dout));

  aes_decrypt u_dec (
    .clk(clk), .rst_n(rst_n),
    .key_valid(dec_key_load), .key(key), .key_ready(dec_key_ready),
    .in_valid(dec_in_valid), .in_ready(dec_in_ready), .ct(dec_din),
    .out_valid(dec_out_valid), .pt(dec_dout));

endmodule
