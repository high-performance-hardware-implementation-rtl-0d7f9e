// aes_ofb: output-feedback (OFB) mode around the iterative encryptor.
//
// In OFB mode the cipher only generates a keystream: O_1 = E_K(IV),
// O_i = E_K(O_{i-1}), and each data block is XORed with it,
// dout_i = din_i ^ O_i. The keystream never depends on the data, so the same
// operation encrypts and decrypts, and a bit flipped in a transmitted block
// corrupts only that bit of the recovered data. With ofb_en low the block
// is a plain (ECB) encryptor: dout = E_K(din).
//
// The feedback register fb_q holds the next encryptor input. A new block
// may be accepted in the same cycle the previous keystream block appears;
// the encryptor input then takes that keystream block straight from the
// encryptor output (a bypass around fb_q), so OFB runs at the full rate of
// one block per 10 cycles. iv_load writes fb_q (restarting the keystream)
// and holds off new blocks for that cycle; it takes priority over the
// feedback write.
//
// Interface: ofb_en is sampled with each block; key is sampled by the
// encryptor with each block; valid/ready on input, one-cycle out_valid pulse
// with dout on output. The OFB structure follows the mode's definition; the
// IV strobe and the ECB fallback are this RTL's choices.
module aes_ofb
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ofb_en,
  input  logic   iv_load,
  input  block_t iv,
  input  block_t key,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t din,
  output logic   out_valid,
  output block_t dout
);

  block_t fb_q, data_q, enc_in, enc_out, fb_next;
  logic   ofb_q, enc_ready, enc_valid, fire, fb_update;

  assign in_ready = enc_ready && !iv_load;
  assign fire     = in_valid && in_ready;

  // Keystream block leaving the encryptor this cycle feeds the next input.
  assign fb_update = enc_valid && ofb_q;
  assign fb_next   = fb_update ? enc_out : fb_q;
  assign enc_in    = ofb_en ? fb_next : din;

  aes_encrypt u_enc (
    .clk(clk), .rst_n(rst_n),
    .in_valid(fire), .in_ready(enc_ready),
    .key(key), .pt(enc_in),
    .out_valid(enc_valid), .ct(enc_out));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fb_q   <= '0;
      data_q <= '0;
      ofb_q  <= 1'b0;
    end else begin
      if (iv_load)        fb_q <= iv;
      else if (fb_update) fb_q <= enc_out;
      if (fire) begin
        data_q <= din;
        ofb_q  <= ofb_en;
      end
    end
  end

  assign out_valid = enc_valid;
  assign dout      = ofb_q ? (data_q ^ enc_out) : enc_out;

endmodule
