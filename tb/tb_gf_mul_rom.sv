// tb_gf_mul_rom: exhaustive check of the constant-multiplier tables for all
// six constants used by MixColumns and InvMixColumns, against the reference
// GF(2^8) multiplier, plus two published
// spot checks ({57}*{02}={ae}, {57}*{03}={f9}).
module tb_gf_mul_rom;
  import aes_ref_pkg::*;

  localparam logic [7:0] CONSTS [6] = '{8'h02, 8'h03, 8'h09, 8'h0b, 8'h0d, 8'h0e};

  logic [7:0] a;
  logic [7:0] y [6];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < 6; k++) begin : g_dut
    gf_mul_rom #(.MULT(CONSTS[k])) dut (.a(a), .y(y[k]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i); #1;
      for (int k = 0; k < 6; k++) begin
        checks++;
        if (y[k] !== mul(CONSTS[k], 8'(i))) begin
          failures++;
          $display("FAIL %02h*%02h=%02h", CONSTS[k], a, y[k]);
        end
      end
    end
    a = 8'h57; #1;
    checks += 2;
    if (y[0] !== 8'hae) failures++;
    if (y[1] !== 8'hf9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
