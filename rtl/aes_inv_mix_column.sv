// aes_inv_mix_column: InvMixColumns on a single 32-bit column.
//
// Multiplies the column by {0b}x^3 + {0d}x^2 + {09}x + {0e} modulo x^4+1,
// the inverse of the MixColumns polynomial:
//   b_i = 14*a_i ^ 11*a_{i+1} ^ 13*a_{i+2} ^ 9*a_{i+3}   (indices mod 4)
// Each product comes from a constant-multiplier table (gf_mul_rom).
//
// Ports: col_in, col_out (row 0 in bits 31:24). Purely combinational.
// Table-based inverse mixing follows the architecture; one table per
// coefficient is this RTL's choice.
module aes_inv_mix_column
  import aes_pkg::*;
(
  input  word_t col_in,
  output word_t col_out
);

  byte_t a [4];
  byte_t m9 [4];
  byte_t mb [4];
  byte_t md [4];
  byte_t me [4];

  for (genvar i = 0; i < 4; i++) begin : g_byte
    assign a[i] = col_in[31-8*i -: 8];
    gf_mul_rom #(.MULT(8'h09)) u_m9 (.a(a[i]), .y(m9[i]));
    gf_mul_rom #(.MULT(8'h0b)) u_mb (.a(a[i]), .y(mb[i]));
    gf_mul_rom #(.MULT(8'h0d)) u_md (.a(a[i]), .y(md[i]));
    gf_mul_rom #(.MULT(8'h0e)) u_me (.a(a[i]), .y(me[i]));
    assign col_out[31-8*i -: 8] = me[i] ^ mb[(i+1)%4] ^ md[(i+2)%4] ^ m9[(i+3)%4];
  end

endmodule
