// tb_aes_key_round: walks the whole AES-128 key schedule of the standard's
// example key 2b7e1516 28aed2a6 abf71588 09cf4f3c through the unit (checking
// the published round-1 and round-10 keys), then checks 1000 random keys and
// round constants against the reference model.
module tb_aes_key_round;
  import aes_ref_pkg::*;

  u128 k_in, k_out;
  logic [7:0] rc;
  int checks = 0, failures = 0;

  aes_key_round dut (.key_in(k_in), .rc(rc), .key_out(k_out));

  localparam logic [7:0] RCON [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  task automatic check(u128 exp);
    checks++;
    if (k_out !== exp) begin
      failures++;
      $display("FAIL key_round(%032h, %02h)=%032h exp %032h", k_in, rc, k_out, exp);
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
    k_in = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int r = 1; r <= 10; r++) begin
      rc = RCON[r-1]; #1;
      check(next_key(k_in, r));
      if (r == 1)  check(128'ha0fafe1788542cb123a339392a6c7605);
      if (r == 10) check(128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
      k_in = k_out;
    end
    for (int i = 0; i < 1000; i++) begin
      automatic int r = 1 + ($urandom % 10);
      k_in = rand128(); rc = RCON[r-1]; #1;
      check(next_key(k_in, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
