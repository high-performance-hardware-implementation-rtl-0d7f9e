// gf_mul_rom: multiplication of a byte by a fixed constant in GF(2^8), as a
// 256 x 8 read-only table.
//
// MixColumns and InvMixColumns are built from these tables: each output byte
// of a column is the XOR of four table outputs. MULT selects the constant
// (2 and 3 for MixColumns; 9, 11, 13 and 14 for InvMixColumns). The
// reduction polynomial is the AES one, x^8+x^4+x^3+x+1. Splitting the mixing
// step into one table per coefficient is this RTL's choice.
//
// Ports: a (input byte), y (MULT * a). Purely combinational.
module gf_mul_rom
  import aes_pkg::*;
#(
  parameter byte_t MULT = 8'h02
) (
  input  byte_t a,
  output byte_t y
);

  function automatic rom256_t build_rom();
    rom256_t t;
    for (int i = 0; i < 256; i++) t[i] = gf_mul(byte_t'(i), MULT);
    return t;
  endfunction

  localparam rom256_t ROM = build_rom();

  assign y = ROM[a];

endmodule
