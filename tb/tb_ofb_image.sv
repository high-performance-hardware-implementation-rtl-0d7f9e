// tb_ofb_image: OFB encryption of a 500 x 500 pixel, 24-bit image through
// the full engine at its default configuration.
//
// The image (750,000 bytes, 46,875 blocks of 128 bits) is generated on the
// fly from a pixel formula, streamed back to back through the encryption
// path in OFB mode, and every ciphertext block is checked against the
// reference keystream. The ciphertext is then decrypted (OFB again, same
// IV) with one bit flipped in one block, as a transmission error would:
// the recovered image must differ from the original in exactly that one
// bit, i.e. the error does not spread to other bits or blocks. Finally the
// image is encrypted again with a single-event upset: one bit of the cipher
// state (byte 3, the SubBytes input of round 3) is flipped while block
// 20,000 is being encrypted. In OFB the corrupted keystream block is fed
// back, so every block from 20,000 on must come out wrong and every block
// before it right. A second run puts a one-bit error on byte 7 at the
// MixColumns input of round 6 while block 40,000 is encrypted (injected as
// its MixColumns image in the state register), with the same check. Also checks that the whole image takes 10 cycles per
// block.
module tb_ofb_image;
  import aes_ref_pkg::*;

  localparam int W = 500, H = 500;
  localparam int NBYTES = W * H * 3;
  localparam int NBLK   = NBYTES / 16;         // 46875
  localparam int ERR_BLK = 20000, ERR_BIT = 77;
  localparam int SEU_BLK = 20000, SEU_BIT = 127 - 8*3 - 2;   // a bit of state byte 3
  localparam int MC_BLK  = 40000, MC_BIT  = 127 - 8*7 - 5;   // a bit of byte 7

  logic clk = 0, rst_n = 0;
  u128  key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  u128  iv  = 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff;
  logic enc_ofb_en = 1, enc_iv_load = 0, enc_in_valid = 0, enc_in_ready, enc_out_valid;
  u128  enc_iv = '0, enc_din = '0, enc_dout;
  logic dec_key_ready, dec_in_ready, dec_out_valid;
  u128  dec_dout;

  int checks = 0, failures = 0;
  longint cycle = 0;

  aes_top dut (
    .clk(clk), .rst_n(rst_n), .key(key),
    .enc_ofb_en(enc_ofb_en), .enc_iv_load(enc_iv_load), .enc_iv(enc_iv),
    .enc_in_valid(enc_in_valid), .enc_in_ready(enc_in_ready), .enc_din(enc_din),
    .enc_out_valid(enc_out_valid), .enc_dout(enc_dout),
    .dec_key_load(1'b0), .dec_key_ready(dec_key_ready),
    .dec_in_valid(1'b0), .dec_in_ready(dec_in_ready), .dec_din('0),
    .dec_out_valid(dec_out_valid), .dec_dout(dec_dout));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Pixel byte n of the image: three 8-bit bands of a smooth test pattern.
  function automatic u8 img_byte(int n);
    int p = n / 3, band = n % 3;
    int x = p % W, y = p / W;
    case (band)
      0:       return u8'(x + y);
      1:       return u8'(x ^ y);
      default: return u8'((x * y) >> 4);
    endcase
  endfunction

  function automatic u128 img_block(int b);
    u128 v;
    for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = img_byte(16*b + i);
    return v;
  endfunction

  u128 ct_mem [NBLK];
  int  n_out = 0;
  u128 ks = '0;

  // Collects outputs of the encryption path, in order.
  u128 out_q [$];
  always @(negedge clk) if (rst_n && enc_out_valid) out_q.push_back(enc_dout);

  task automatic run_pass(bit decrypt_pass, output longint cycles);
    longint t0;
    @(posedge clk) #1;
    enc_iv = iv; enc_iv_load = 1;
    @(posedge clk) #1;
    enc_iv_load = 0;
    out_q.delete();
    t0 = cycle;
    for (int b = 0; b < NBLK; b++) begin
      if (decrypt_pass)
        enc_din = ct_mem[b] ^ ((b == ERR_BLK) ? (128'h1 << ERR_BIT) : 128'h0);
      else
        enc_din = img_block(b);
      enc_in_valid = 1;
      @(negedge clk);
      while (!enc_in_ready) @(negedge clk);
      @(posedge clk) #1;
    end
    enc_in_valid = 0;
    wait (out_q.size() == NBLK);
    cycles = cycle - t0;
  endtask

  initial begin
    repeat (4 * NBLK * 10 + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Single-event upset: while block SEU_BLK is in its third round, invert one
  // bit of the encryptor's state register for that cycle.
  logic seu_armed = 0, mc_armed = 0;
  logic [127:0] mc_val;
  int   n_acc = 0;
  int   n_seu = 0;
  logic [127:0] seu_val;
  always @(negedge clk) if (rst_n && enc_in_valid && enc_in_ready) n_acc <= n_acc + 1;

  initial begin
    forever begin
      @(negedge clk);
      if (seu_armed && enc_in_valid && enc_in_ready && n_acc == SEU_BLK) begin
        @(posedge clk);       // accept, round 1
        @(posedge clk);       // round 2
        @(negedge clk);       // round 3 is being computed now
        seu_val = dut.u_enc.u_enc.state_q ^ (128'h1 << SEU_BIT);
        force dut.u_enc.u_enc.state_q = seu_val;
        #4;
        release dut.u_enc.u_enc.state_q;
        n_seu++;
        seu_armed = 0;
      end
      if (mc_armed && enc_in_valid && enc_in_ready && n_acc == MC_BLK) begin
        // A bit error e at the MixColumns input of round 6 reaches the state
        // register as MixColumns(e), as the rest of the round is linear.
        repeat (6) @(posedge clk);   // rounds 1..6 done
        @(negedge clk);
        mc_val = dut.u_enc.u_enc.state_q ^ mixcol(128'h1 << MC_BIT, 1'b0);
        force dut.u_enc.u_enc.state_q = mc_val;
        #4;
        release dut.u_enc.u_enc.state_q;
        n_seu++;
        mc_armed = 0;
      end
    end
  end

  task automatic check_upset(int blk);
    int early, late;
    early = 0; late = 0;
    for (int b = 0; b < NBLK; b++)
      if (out_q[b] !== ct_mem[b]) begin
        if (b < blk) early++; else late++;
      end
    checks += 2;
    if (n_seu != 1) begin failures++; $display("FAIL upset injected %0d times", n_seu); end
    if (early != 0 || late != NBLK - blk) begin
      failures++; $display("FAIL upset: %0d wrong blocks before, %0d after (expected 0, %0d)", early, late, NBLK - blk);
    end
    $display("upset in block %0d: %0d wrong blocks before it, %0d from it on", blk, early, late);
  endtask

  initial begin
    longint cyc;
    int bad_bits, bad_blocks;
    ref_init();
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Pass 1: encrypt the image.
    run_pass(1'b0, cyc);
    ks = iv;
    bad_blocks = 0;
    for (int b = 0; b < NBLK; b++) begin
      ks = encrypt(key, ks);
      ct_mem[b] = out_q[b];
      if (out_q[b] !== (img_block(b) ^ ks)) bad_blocks++;
    end
    checks += 2;
    if (bad_blocks != 0) begin failures++; $display("FAIL %0d wrong ciphertext blocks", bad_blocks); end
    if (cyc > 10 * NBLK + 20) begin failures++; $display("FAIL encryption took %0d cycles", cyc); end
    $display("encrypted %0d blocks in %0d cycles", NBLK, cyc);

    // Pass 2: decrypt with one flipped ciphertext bit.
    run_pass(1'b1, cyc);
    bad_bits = 0;
    bad_blocks = 0;
    for (int b = 0; b < NBLK; b++) begin
      u128 d;
      d = out_q[b] ^ img_block(b);
      if (d != 0) bad_blocks++;
      bad_bits += $countones(d);
    end
    checks += 3;
    if (bad_blocks != 1 || bad_bits != 1) begin
      failures++; $display("FAIL error spread: %0d blocks, %0d bits", bad_blocks, bad_bits);
    end
    if ((out_q[ERR_BLK] ^ img_block(ERR_BLK)) !== (128'h1 << ERR_BIT)) begin
      failures++; $display("FAIL flipped bit not where expected");
    end
    if (cyc > 10 * NBLK + 20) begin failures++; $display("FAIL decryption took %0d cycles", cyc); end
    $display("decrypted with one channel error: %0d wrong block(s), %0d wrong bit(s)", bad_blocks, bad_bits);

    // Pass 3: encrypt again with an upset inside the cipher.
    n_acc = 0;
    seu_armed = 1;
    run_pass(1'b0, cyc);
    check_upset(SEU_BLK);

    // Pass 4: upset at the MixColumns input of round 6 of block 40,000.
    n_acc = 0;
    n_seu = 0;
    mc_armed = 1;
    run_pass(1'b0, cyc);
    check_upset(MC_BLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
