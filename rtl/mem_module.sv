// mem_module: one memory module of the board, two 32K x 8 SRAMs side by side.
//
// Byte address bit 0 selects the SRAM, so the module can be written or read
// as 16-bit words (both SRAMs, word address = byte address bits 15..1, low
// byte in the even SRAM) or as bytes (the two SRAMs enabled alternately).
// One address serves both directions: the owner of the module drives it.
module mem_module #(
  parameter int unsigned AW = 15   // address bits of each SRAM
) (
  input  logic        clk,
  input  logic [AW:0] addr,      // byte address
  input  logic        we_word,
  input  logic        we_byte,
  input  logic [15:0] din,       // word, or byte in [7:0]
  output logic [15:0] dout_word, // word at addr[AW:1]
  output logic [7:0]  dout_byte  // byte at addr
);

  logic [7:0] d_even, d_odd, q_even, q_odd;
  logic       we_even, we_odd;

  assign we_even = we_word || (we_byte && !addr[0]);
  assign we_odd  = we_word || (we_byte &&  addr[0]);
  assign d_even  = din[7:0];
  assign d_odd   = we_word ? din[15:8] : din[7:0];

  sram #(.AW(AW)) u_even (.clk(clk), .we(we_even), .addr(addr[AW:1]), .din(d_even), .dout(q_even));
  sram #(.AW(AW)) u_odd  (.clk(clk), .we(we_odd),  .addr(addr[AW:1]), .din(d_odd),  .dout(q_odd));

  assign dout_word = {q_odd, q_even};
  assign dout_byte = addr[0] ? q_odd : q_even;

endmodule
