// tb_aes_decrypt: AES-128 decryptor against the reference model.
//
// Loads a key (checking the 11-cycle key expansion and that no block is
// taken meanwhile), decrypts the standard's examples, random ciphertexts
// with random gaps, a run of back-to-back blocks, and repeats with new keys.
// Checks every plaintext, the 10-cycle latency and the 10-cycle spacing of
// back-to-back blocks.
module tb_aes_decrypt;
  import aes_ref_pkg::*;

  localparam int LAT  = 10;
  localparam int KLAT = 11;

  logic clk = 0, rst_n = 0;
  logic key_valid = 0, key_ready;
  logic in_valid = 0, in_ready, out_valid;
  u128  key = '0, cur_key = '0, ct = '0, pt;
  int   checks = 0, failures = 0;
  longint cycle = 0;

  aes_decrypt dut (.clk(clk), .rst_n(rst_n), .key_valid(key_valid), .key(key), .key_ready(key_ready),
                   .in_valid(in_valid), .in_ready(in_ready), .ct(ct), .out_valid(out_valid), .pt(pt));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  u128    exp_q [$];
  longint t_q   [$];

  // Scoreboard, sampled at the falling edge.
  always @(negedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      exp_q.push_back(decrypt(cur_key, ct));
      t_q.push_back(cycle);
    end
    if (out_valid) begin
      checks += 2;
      if (exp_q.size() == 0) begin
        failures += 2;
        $display("FAIL unexpected output");
      end else begin
        u128 e;
        longint t;
        e = exp_q.pop_front();
        t = t_q.pop_front();
        if (pt !== e) begin
          failures++;
          $display("FAIL pt=%032h exp=%032h", pt, e);
        end
        if (cycle - t != LAT) begin
          failures++;
          $display("FAIL latency %0d", cycle - t);
        end
      end
    end
  end

  // Inputs change 1 ns after a rising edge.
  task automatic load_key(u128 k);
    longint t0;
    @(posedge clk) #1;
    key = k; key_valid = 1;
    @(posedge clk) #1;
    key_valid = 0; cur_key = k;
    t0 = cycle;
    key = rand128();          // the key input is only sampled once
    in_valid = 1; ct = rand128();
    @(negedge clk);
    while (!key_ready) begin
      checks++;
      if (in_ready) begin
        failures++;
        $display("FAIL in_ready during key expansion");
      end
      @(negedge clk);
    end
    in_valid = 0;
    checks++;
    if (cycle - t0 != KLAT - 1) begin
      failures++;
      $display("FAIL key expansion took %0d cycles", cycle - t0 + 1);
    end
  endtask

  task automatic send(u128 c);
    @(posedge clk) #1;
    ct = c; in_valid = 1;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    @(posedge clk) #1;
    in_valid = 0;
  endtask

  logic   b2b = 0;
  longint prev_acc = -1;
  always @(negedge clk) if (rst_n && b2b && in_valid && in_ready) begin
    if (prev_acc >= 0) begin
      checks++;
      if (cycle - prev_acc != LAT) begin
        failures++;
        $display("FAIL back-to-back spacing %0d", cycle - prev_acc);
      end
    end
    prev_acc = cycle;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (in_ready) begin failures++; $display("FAIL ready without a key"); end
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    send(128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    wait (exp_q.size() == 0);
    checks++;
    if (pt !== 128'h00112233445566778899aabbccddeeff) begin failures++; $display("FAIL standard example"); end
    for (int n = 0; n < 3; n++) begin
      load_key(rand128());
      for (int i = 0; i < 60; i++) begin
        send(rand128());
        repeat ($urandom % 14) @(posedge clk);
      end
      wait (exp_q.size() == 0);
      @(posedge clk) #1;
      in_valid = 1; ct = rand128();
      b2b = 1; prev_acc = -1;
      for (int i = 0; i < 20; i++) begin
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        @(posedge clk) #1;
        ct = rand128();
      end
      in_valid = 0;
      b2b = 0;
      wait (exp_q.size() == 0);
    end
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
