// aes_inv_sbox: the AES InvSubBytes table as a 256 x 8 read-only table.
//
// Contents are the inverse permutation of the forward S-box, built at
// elaboration: for every x, ROM[S(x)] = x. Read asynchronously.
//
// Ports: a (input byte), y (inverse S-box of a). Purely combinational.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t y
);

  function automatic rom256_t build_rom();
    rom256_t s = sbox_table();
    rom256_t t;
    for (int i = 0; i < 256; i++) t[s[i]] = byte_t'(i);
    return t;
  endfunction

  localparam rom256_t ROM = build_rom();

  assign y = ROM[a];

endmodule
