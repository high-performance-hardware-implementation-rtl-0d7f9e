// aes_key_ram: round-key memory for the decryptor (offline key expansion).
//
// DEPTH words of WIDTH bits with one write port and one read port whose
// output is registered, the behaviour of an FPGA block RAM: rdata shows
// mem[raddr] one clock after raddr is presented. A write and a read of the
// same address in one cycle return the old contents. Contents are not reset.
//
// Ports: clk, we, waddr, wdata, raddr, rdata. Keeping the decryption keys
// in block RAM follows the architecture; the depth, the registered read and
// read-old-data on collisions are this RTL's choices.
module aes_key_ram #(
  parameter int unsigned DEPTH = 11,
  parameter int unsigned WIDTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
