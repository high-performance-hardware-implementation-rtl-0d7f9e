// tb_aes_dec_round: checks one decryption round (normal and last) against
// the reference model on random data, and that it undoes SubBytes,
// ShiftRows and MixColumns as computed by the forward transforms.
module tb_aes_dec_round;
  import aes_ref_pkg::*;

  u128  s_in, rk, s_out;
  logic last;
  u128  x, k;
  int checks = 0, failures = 0;

  aes_dec_round dut (.state_in(s_in), .round_key(rk), .last(last), .state_out(s_out));

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
    for (int i = 0; i < 1000; i++) begin
      s_in = rand128(); rk = rand128(); last = 1'($urandom);
      #1; check(dec_round(s_in, rk, last));
    end
    // Inverse property, checked with the forward transforms only:
    // with s_in = ShiftRows(SubBytes(x)) the round returns x ^ k (last) or
    // InvMixColumns(x ^ k), whose MixColumns must give back x ^ k.
    for (int i = 0; i < 200; i++) begin
      x = rand128();
      k = rand128();
      s_in = subshift(x); rk = k; last = 1'(i % 2);
      #1;
      checks++;
      if ((last ? s_out : mixcol(s_out, 1'b0)) !== (x ^ k)) begin
        failures++;
        $display("FAIL inverse property last=%0d x=%032h k=%032h out=%032h", last, x, k, s_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
