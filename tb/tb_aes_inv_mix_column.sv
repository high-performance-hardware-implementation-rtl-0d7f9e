// tb_aes_inv_mix_column: checks one-column InvMixColumns against the reference
// model on 4000 random columns and on the published example
// 8e 4d a1 bc -> db 13 53 45 (the inverse of the MixColumns example).
module tb_aes_inv_mix_column;
  import aes_ref_pkg::*;

  logic [31:0] col_in, col_out;
  int checks = 0, failures = 0;

  aes_inv_mix_column dut (.col_in(col_in), .col_out(col_out));

  task automatic check(logic [31:0] exp);
    checks++;
    if (col_out !== exp) begin
      failures++;
      $display("FAIL invmix(%08h)=%08h exp %08h", col_in, col_out, exp);
    end
  endtask

  // Reference on column 0 of a state whose other columns are zero.
  function automatic logic [31:0] ref_col(logic [31:0] c);
    u128 s = mixcol({c, 96'h0}, 1'b1);
    return s[127:96];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    col_in = 32'h8e4da1bc; #1; check(32'hdb135345);
    col_in = 32'h01010101; #1; check(32'h01010101);
    for (int i = 0; i < 4000; i++) begin
      col_in = $urandom; #1; check(ref_col(col_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
