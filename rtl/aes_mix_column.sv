// aes_mix_column: MixColumns on a single 32-bit column.
//
// The column (a0..a3, a0 in bits 31:24) is multiplied by the fixed polynomial
// a(x) = {03}x^3 + {01}x^2 + {01}x + {02} modulo x^4+1:
//   b_i = 2*a_i ^ 3*a_{i+1} ^ a_{i+2} ^ a_{i+3}   (indices mod 4)
// The x2 and x3 products come from constant-multiplier tables (gf_mul_rom).
// Four of these units side by side mix the whole state in parallel, one per
// column, since the columns are independent.
//
// Ports: col_in, col_out. Purely combinational. Table-based mixing and
// the four parallel column units follow the architecture; one table per
// coefficient is this RTL's choice.
module aes_mix_column
  import aes_pkg::*;
(
  input  word_t col_in,
  output word_t col_out
);

  byte_t a [4];
  byte_t m2 [4];
  byte_t m3 [4];

  for (genvar i = 0; i < 4; i++) begin : g_byte
    assign a[i] = col_in[31-8*i -: 8];
    gf_mul_rom #(.MULT(8'h02)) u_m2 (.a(a[i]), .y(m2[i]));
    gf_mul_rom #(.MULT(8'h03)) u_m3 (.a(a[i]), .y(m3[i]));
    assign col_out[31-8*i -: 8] = m2[i] ^ m3[(i+1)%4] ^ a[(i+2)%4] ^ a[(i+3)%4];
  end

endmodule
