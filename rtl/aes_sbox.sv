// aes_sbox: the AES SubBytes substitution box as a 256 x 8 read-only table.
//
// The table is filled at elaboration from the S-box definition (inverse in
// GF(2^8), then the affine transform with constant 0x63) and read
// asynchronously, so one lookup costs one LUT level in a round. On an FPGA
// it maps to LUTs or a ROM, which is the implementation style of the
// design; computing the contents rather than listing them is this RTL's
// choice.
//
// Ports: a (input byte), y (S-box of a). Purely combinational.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t y
);

  localparam rom256_t ROM = sbox_table();

  assign y = ROM[a];

endmodule
