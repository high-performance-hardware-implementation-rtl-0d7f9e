// tb_aes_sbox: exhaustive check of the S-box table against the reference
// model (all 256 inputs) plus a few published entries
// (S(00)=63, S(01)=7c, S(53)=ed, S(ff)=16).
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] a, y;
  int checks = 0, failures = 0;

  aes_sbox dut (.a(a), .y(y));

  task automatic check(logic [7:0] exp);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL sbox(%02h)=%02h exp %02h", a, y, exp);
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
      a = 8'(i); #1; check(SB[i]);
    end
    a = 8'h00; #1; check(8'h63);
    a = 8'h01; #1; check(8'h7c);
    a = 8'h53; #1; check(8'hed);
    a = 8'hff; #1; check(8'h16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
