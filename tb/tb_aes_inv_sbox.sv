// tb_aes_inv_sbox: exhaustive check of the inverse S-box table against the
// model (all 256 inputs) plus a few published entries
// (InvS(63)=00, InvS(7c)=01, InvS(ed)=53, InvS(16)=ff).
module tb_aes_inv_sbox;
  import aes_ref_pkg::*;

  logic [7:0] a, y;
  int checks = 0, failures = 0;

  aes_inv_sbox dut (.a(a), .y(y));

  task automatic check(logic [7:0] exp);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL inv_sbox(%02h)=%02h exp %02h", a, y, exp);
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
    for (int i = 0; i < 256; i++) begin
      a = 8'(i); #1; check(ISB[i]);
    end
    a = 8'h63; #1; check(8'h00);
    a = 8'h7c; #1; check(8'h01);
    a = 8'hed; #1; check(8'h53);
    a = 8'h16; #1; check(8'hff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
