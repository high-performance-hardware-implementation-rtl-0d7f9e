// tb_aes_ofb: OFB mode and ECB fallback against the reference model.
//
// OFB: the keystream is O_1 = E_K(IV), O_i = E_K(O_{i-1}) and
// dout_i = din_i ^ O_i. Checks the first two blocks of the published
// AES-128 OFB example (key 2b7e1516..., IV 00010203...), random streams
// sent back to back (the feedback bypass) and with gaps, IV reloads,
// OFB decryption (running the ciphertext through again gives the
// plaintext back) and switches to ECB and back. Counts the bypass, IV
// reloads and mode switches and fails if one never happened.
module tb_aes_ofb;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ofb_en = 0, iv_load = 0, in_valid = 0, in_ready, out_valid;
  u128  iv = '0, key = '0, din = '0, dout;
  int   checks = 0, failures = 0;
  int   n_bypass = 0, n_ivload = 0, n_switch = 0;

  aes_ofb dut (.clk(clk), .rst_n(rst_n), .ofb_en(ofb_en), .iv_load(iv_load), .iv(iv), .key(key),
               .in_valid(in_valid), .in_ready(in_ready), .din(din), .out_valid(out_valid), .dout(dout));

  always #5 clk = ~clk;

  // Reference keystream state.
  u128  ks = '0;
  logic prev_mode = 0;
  u128  exp_q [$];
  u128  got_q [$];

  always @(negedge clk) if (rst_n) begin
    if (iv_load) begin
      ks = iv;
      n_ivload++;
    end
    if (in_valid && in_ready) begin
      if (ofb_en) begin
        ks = encrypt(key, ks);
        exp_q.push_back(din ^ ks);
      end else begin
        exp_q.push_back(encrypt(key, din));
      end
      if (ofb_en != prev_mode) n_switch++;
      prev_mode = ofb_en;
      if (out_valid && ofb_en) n_bypass++;
    end
    if (out_valid) begin
      got_q.push_back(dout);
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        u128 e;
        e = exp_q.pop_front();
        if (dout !== e) begin
          failures++;
          $display("FAIL dout=%032h exp=%032h", dout, e);
        end
      end
    end
  end

  task automatic load_iv(u128 v);
    @(posedge clk) #1;
    iv = v; iv_load = 1;
    @(posedge clk) #1;
    iv_load = 0;
  endtask

  // Send a stream of blocks; gap = 0 keeps in_valid high (back to back).
  task automatic stream(input u128 blocks [$], int max_gap);
    @(posedge clk) #1;
    for (int i = 0; i < blocks.size(); i++) begin
      din = blocks[i]; in_valid = 1;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      @(posedge clk) #1;
      if (max_gap > 0) begin
        in_valid = 0;
        repeat ($urandom % max_gap) @(posedge clk);
        #1;
      end
    end
    in_valid = 0;
    wait (exp_q.size() == 0);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u128 blk [$];
    u128 ptx [$];
    ref_init();
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Published OFB example, first two blocks.
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    ofb_en = 1;
    load_iv(128'h000102030405060708090a0b0c0d0e0f);
    got_q.delete();
    stream('{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51}, 0);
    checks += 2;
    if (got_q[0] !== 128'h3b3fd92eb72dad20333449f8e83cfb4a) begin failures++; $display("FAIL OFB example block 1"); end
    if (got_q[1] !== 128'h7789508d16918f03f53c52dac54ed825) begin failures++; $display("FAIL OFB example block 2"); end

    for (int n = 0; n < 6; n++) begin
      u128 v;
      key = rand128();
      v = rand128();
      // OFB encryption of a random message, then decryption of the result.
      ptx.delete();
      for (int i = 0; i < 12; i++) ptx.push_back(rand128());
      ofb_en = 1;
      load_iv(v);
      got_q.delete();
      stream(ptx, (n % 2) ? 6 : 0);
      blk = got_q;
      load_iv(v);
      got_q.delete();
      stream(blk, (n % 2) ? 0 : 6);
      for (int i = 0; i < ptx.size(); i++) begin
        checks++;
        if (got_q[i] !== ptx[i]) begin failures++; $display("FAIL OFB round trip block %0d", i); end
      end
      // ECB blocks in between.
      ofb_en = 0;
      blk.delete();
      for (int i = 0; i < 5; i++) blk.push_back(rand128());
      stream(blk, 3);
    end

    checks += 3;
    if (n_bypass == 0) begin failures++; $display("FAIL feedback bypass never used"); end
    if (n_ivload == 0) begin failures++; $display("FAIL no IV load"); end
    if (n_switch == 0) begin failures++; $display("FAIL no mode switch"); end
    $display("bypass=%0d iv_loads=%0d mode_switches=%0d", n_bypass, n_ivload, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
