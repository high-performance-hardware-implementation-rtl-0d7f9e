// tb_aes_encrypt: AES-128 encryptor against the reference model.
//
// Sends the two AES-128 examples of the standard, then random keys and
// plaintexts with random idle gaps, and a run of back-to-back blocks.
// Checks every ciphertext, that each result appears exactly 10 cycles after
// its block was accepted, and that back-to-back blocks are accepted every
// 10 cycles (one block per 10 cycles).
module tb_aes_encrypt;
  import aes_ref_pkg::*;

  localparam int LAT = 10;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid;
  u128  key = '0, pt = '0, ct;
  int   checks = 0, failures = 0;
  longint cycle = 0;

  aes_encrypt dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                   .key(key), .pt(pt), .out_valid(out_valid), .ct(ct));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  u128    exp_q [$];
  longint t_q   [$];

  // Scoreboard, sampled at the falling edge where all signals are stable:
  // record blocks about to be accepted, compare results.
  always @(negedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      exp_q.push_back(encrypt(key, pt));
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
        if (ct !== e) begin
          failures++;
          $display("FAIL ct=%032h exp=%032h", ct, e);
        end
        if (cycle - t != LAT) begin
          failures++;
          $display("FAIL latency %0d", cycle - t);
        end
      end
    end
  end

  // Inputs change 1 ns after a rising edge; the scoreboard samples at the
  // falling edge.
  task automatic send(u128 k, u128 p);
    @(posedge clk) #1;
    key = k; pt = p; in_valid = 1;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    @(posedge clk) #1;
    in_valid = 0;
  endtask

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
    // Published examples.
    send(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff);
    send(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734);
    wait (exp_q.size() == 0);
    checks++;
    if (ct !== 128'h3925841d02dc09fbdc118597196a0b32) begin
      failures++; $display("FAIL standard example");
    end
    // Random blocks with random gaps.
    for (int i = 0; i < 200; i++) begin
      send(rand128(), rand128());
      repeat ($urandom % 14) @(posedge clk);
    end
    wait (exp_q.size() == 0);
    // Back-to-back: hold in_valid high for 50 blocks, count accept spacing.
    @(posedge clk) #1;
    in_valid = 1; key = rand128(); pt = rand128();
    b2b = 1;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      @(posedge clk) #1;
      key = rand128(); pt = rand128();
    end
    in_valid = 0;
    b2b = 0;
    wait (exp_q.size() == 0);
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Spacing of accepted blocks while in_valid stays high.
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
endmodule
