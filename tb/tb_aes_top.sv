// tb_aes_top: end-to-end test of the AES-128 engine.
//
// Runs both datapaths at the same time: the encryption path alternates
// between ECB and OFB streams (with IV reloads, back-to-back blocks that use
// the keystream feedback bypass, and gaps), and every ECB ciphertext it
// produces is fed to the decryption path, which must return the original
// plaintext. OFB ciphertexts are checked against the reference and then run
// through OFB again to recover the plaintext. The decryption key is
// reloaded (offline key expansion) whenever the key changes. Checks the
// 10-cycle latency and block spacing on both paths and counts each
// mechanism: ECB blocks, OFB blocks, feedback bypasses, IV loads, mode
// switches, key expansions, decryptions, blocks held off during key
// expansion. NBLK sets the number of blocks per stream.
module tb_aes_top;
  import aes_ref_pkg::*;

  parameter int NBLK   = 8;
  parameter int NROUND = 4;
  localparam int LAT   = 10;

  logic clk = 0, rst_n = 0;
  u128  key = '0;
  logic enc_ofb_en = 0, enc_iv_load = 0, enc_in_valid = 0, enc_in_ready, enc_out_valid;
  u128  enc_iv = '0, enc_din = '0, enc_dout;
  logic dec_key_load = 0, dec_key_ready, dec_in_valid = 0, dec_in_ready, dec_out_valid;
  u128  dec_din = '0, dec_dout;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_ecb = 0, n_ofb = 0, n_bypass = 0, n_iv = 0, n_switch = 0, n_kexp = 0, n_dec = 0, n_held = 0;

  aes_top dut (
    .clk(clk), .rst_n(rst_n), .key(key),
    .enc_ofb_en(enc_ofb_en), .enc_iv_load(enc_iv_load), .enc_iv(enc_iv),
    .enc_in_valid(enc_in_valid), .enc_in_ready(enc_in_ready), .enc_din(enc_din),
    .enc_out_valid(enc_out_valid), .enc_dout(enc_dout),
    .dec_key_load(dec_key_load), .dec_key_ready(dec_key_ready),
    .dec_in_valid(dec_in_valid), .dec_in_ready(dec_in_ready), .dec_din(dec_din),
    .dec_out_valid(dec_out_valid), .dec_dout(dec_dout));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s (cycle %0d)", msg, cycle);
  endtask

  // ---------------- encryption-path scoreboard ----------------
  u128    ks = '0;
  logic   prev_mode = 0;
  u128    enc_exp [$];
  longint enc_t [$];
  u128    enc_got [$];

  always @(negedge clk) if (rst_n) begin
    if (enc_iv_load) begin ks = enc_iv; n_iv++; end
    if (enc_in_valid && enc_in_ready) begin
      if (enc_ofb_en) begin
        ks = encrypt(key, ks);
        enc_exp.push_back(enc_din ^ ks);
        n_ofb++;
        if (enc_out_valid) n_bypass++;
      end else begin
        enc_exp.push_back(encrypt(key, enc_din));
        n_ecb++;
      end
      enc_t.push_back(cycle);
      if (enc_ofb_en != prev_mode) n_switch++;
      prev_mode = enc_ofb_en;
    end
    if (enc_out_valid) begin
      u128 e;
      longint t;
      checks += 2;
      if (enc_exp.size() == 0) begin
        fail("unexpected encryption output");
      end else begin
        e = enc_exp.pop_front();
        t = enc_t.pop_front();
        if (enc_dout !== e) fail($sformatf("enc dout=%032h exp=%032h", enc_dout, e));
        if (cycle - t != LAT) fail($sformatf("enc latency %0d", cycle - t));
      end
      enc_got.push_back(enc_dout);
    end
  end

  // ---------------- decryption-path scoreboard ----------------
  u128    dec_exp [$];
  longint dec_t [$];

  always @(negedge clk) if (rst_n) begin
    if (dec_in_valid && !dec_in_ready && !dec_key_ready) n_held++;
    if (dec_out_valid) begin
      u128 e;
      longint t;
      checks += 2;
      n_dec++;
      if (dec_exp.size() == 0) begin
        fail("unexpected decryption output");
      end else begin
        e = dec_exp.pop_front();
        t = dec_t.pop_front();
        if (dec_dout !== e) fail($sformatf("dec dout=%032h exp=%032h", dec_dout, e));
        if (cycle - t != LAT) fail($sformatf("dec latency %0d", cycle - t));
      end
    end
  end

  // ---------------- drivers (inputs change 1 ns after a rising edge) ----------------
  task automatic enc_stream(input u128 blocks [$], int max_gap);
    @(posedge clk) #1;
    for (int i = 0; i < blocks.size(); i++) begin
      enc_din = blocks[i]; enc_in_valid = 1;
      @(negedge clk);
      while (!enc_in_ready) @(negedge clk);
      @(posedge clk) #1;
      if (max_gap > 0) begin
        enc_in_valid = 0;
        repeat ($urandom % max_gap) @(posedge clk);
        #1;
      end
    end
    enc_in_valid = 0;
    wait (enc_exp.size() == 0);
  endtask

  task automatic enc_iv_set(u128 v);
    @(posedge clk) #1;
    enc_iv = v; enc_iv_load = 1;
    @(posedge clk) #1;
    enc_iv_load = 0;
  endtask

  // Decryption path: reload the round keys, then decrypt a list of blocks
  // (offered while the keys are still being expanded).
  task automatic dec_stream(input u128 cts [$], input u128 pts [$], bit new_key);
    @(posedge clk) #1;
    if (new_key) begin
      dec_key_load = 1;
      @(posedge clk) #1;
      dec_key_load = 0;
      n_kexp++;
    end
    for (int i = 0; i < cts.size(); i++) begin
      dec_din = cts[i]; dec_in_valid = 1;
      @(negedge clk);
      while (!dec_in_ready) @(negedge clk);
      dec_exp.push_back(pts[i]);
      dec_t.push_back(cycle);
      @(posedge clk) #1;
    end
    dec_in_valid = 0;
    wait (dec_exp.size() == 0);
  endtask

  initial begin
    repeat (400 * NBLK * NROUND + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u128 pts [$];
    u128 cts [$];
    u128 v;
    ref_init();
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int r = 0; r < NROUND; r++) begin
      key = (r == 0) ? 128'h000102030405060708090a0b0c0d0e0f : rand128();

      // ECB encryption, then decryption of the result on the other path,
      // overlapped with an OFB stream on the encryption path.
      pts.delete();
      for (int i = 0; i < NBLK; i++) pts.push_back(rand128());
      if (r == 0) pts[0] = 128'h00112233445566778899aabbccddeeff;
      enc_ofb_en = 0;
      enc_got.delete();
      enc_stream(pts, (r % 2) ? 5 : 0);
      cts = enc_got;
      if (r == 0) begin
        checks++;
        if (cts[0] !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) fail("standard example");
      end

      fork
        dec_stream(cts, pts, 1'b1);
        begin
          u128 ofb_pt [$];
          for (int i = 0; i < NBLK; i++) ofb_pt.push_back(rand128());
          v = rand128();
          enc_ofb_en = 1;
          enc_iv_set(v);
          enc_got.delete();
          enc_stream(ofb_pt, (r % 2) ? 0 : 5);
          // OFB decryption: same keystream, ciphertext in.
          cts = enc_got;
          enc_iv_set(v);
          enc_got.delete();
          enc_stream(cts, 0);
          for (int i = 0; i < NBLK; i++) begin
            checks++;
            if (enc_got[i] !== ofb_pt[i]) fail($sformatf("OFB round trip block %0d", i));
          end
        end
      join
    end

    checks += 8;
    if (n_ecb == 0)    fail("no ECB block");
    if (n_ofb == 0)    fail("no OFB block");
    if (n_bypass == 0) fail("feedback bypass never used");
    if (n_iv == 0)     fail("no IV load");
    if (n_switch == 0) fail("no mode switch");
    if (n_kexp == 0)   fail("no key expansion");
    if (n_dec == 0)    fail("no decryption");
    if (n_held == 0)   fail("no block held off by key expansion");
    $display("ecb=%0d ofb=%0d bypass=%0d iv_loads=%0d mode_switches=%0d key_expansions=%0d decryptions=%0d held_cycles=%0d",
             n_ecb, n_ofb, n_bypass, n_iv, n_switch, n_kexp, n_dec, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
