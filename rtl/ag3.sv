// ag3: address generator 3, a plain 15-bit synchronous counter for host
// transfers: image words or packed codes into the input memory and result
// words out of the output memory (and it counts quantization table words,
// whose address comes from the bit-map-controlled loader). The address is the counter value. `wrap` pulses with the
// increment that rolls the counter over (a 32K-word module is full).
module ag3 (
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        inc,
  output logic [14:0] a,
  output logic        wrap
);

  always_ff @(posedge clk) begin
    if (rst || clr) a <= '0;
    else if (inc)   a <= a + 15'd1;
  end

  assign wrap = inc && (a == '1);

endmodule
