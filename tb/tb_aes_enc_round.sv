// tb_aes_enc_round: checks one encryption round (normal and last) against
// the reference model on random states and keys, and on round 1 of the
// AES-128 example of the standard (state 193de3be..., key a0fafe17...,
// result a49c7ff2...).
module tb_aes_enc_round;
  import aes_ref_pkg::*;

  u128  s_in, rk, s_out;
  logic last;
  int checks = 0, failures = 0;

  aes_enc_round dut (.state_in(s_in), .round_key(rk), .last(last), .state_out(s_out));

  task automatic check(u128 exp);
    checks++;
    if (s_out !== exp) begin
      failures++;
      $display("FAIL last=%0d in=%032h key=%032h out=%032h exp=%032h", last, s_in, rk, s_out, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    s_in = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    rk   = 128'ha0fafe1788542cb123a339392a6c7605;
    last = 0; #1; check(128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int i = 0; i < 1000; i++) begin
      s_in = rand128(); rk = rand128(); last = 1'($urandom);
      #1; check(enc_round(s_in, rk, last));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
