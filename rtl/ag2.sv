// ag2: address generator 2, a 15-bit synchronous counter addressing the
// output memory while forward-transform coefficients are written.
//
// The ICT processor delivers the 64 coefficients of a block in the order
// (vertical frequency, horizontal frequency) = counter bits Q5..Q0, one
// block after another (Q14..Q6). The word address is the counter with its
// two fields swapped, A = {Q5..Q0, Q14..Q6}, so the 512 coefficients of one
// frequency from 512 consecutive blocks sit at consecutive addresses of a
// memory module, which is what the host needs to find each frequency's
// variance and bit allocation. `wrap` pulses with the increment that rolls
// the counter over, i.e. when a module (512 blocks) is full and the output
// memory modules must exchange. The field swap is this design's reading of
// the "512 coefficients of the same frequency in consecutive addresses" rule.
module ag2 (
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        inc,
  output logic [14:0] q,
  output logic [14:0] a,
  output logic        wrap
);

  always_ff @(posedge clk) begin
    if (rst || clr) q <= '0;
    else if (inc)   q <= q + 15'd1;
  end

  assign a    = {q[5:0], q[14:6]};
  assign wrap = inc && (q == '1);

endmodule
