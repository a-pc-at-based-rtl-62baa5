// sram: 32K x 8 static RAM, the memory chip from which every memory module of
// the board is built. Asynchronous read (data follows the address within the
// same clock), synchronous write when `we` is high. Written as an array so
// that synthesis maps it to a memory; the depth is a parameter.
module sram #(
  parameter int unsigned AW = 15
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    din,
  output logic [7:0]    dout
);

  logic [7:0] mem [2**AW];

  always_ff @(posedge clk)
    if (we) mem[addr] <= din;

  assign dout = mem[addr];

endmodule
