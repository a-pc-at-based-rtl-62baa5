// ict_multiplier: shift-add multiplier of the ICT chip.
//
// Multiplies a 13-bit magnitude X12..X0 by one of the six kernel magnitudes
// {2,3,6,8,9,10} selected by the 3-bit code from the decoder. Each product is
// at most two shifted copies of the multiplicand added together, exactly the
// bit arrangement of the chip's product table (for x9 the sum X + 8X, for x10
// 2X + 8X, and so on), so a single adder is needed. Purely combinational; the
// 17-bit product P16..P0 feeds the accumulator in the same ROW cycle. The
// sign of the kernel element is handled by the accumulator, not here.
module ict_multiplier
  import ict_pkg::*;
(
  input  logic [MAG_W-1:0]  mag,   // multiplicand magnitude
  input  kmag_e             code,  // kernel magnitude code
  output logic [PROD_W-1:0] prod   // magnitude product
);

  logic [PROD_W-1:0] m1, m2, m4, m8;
  logic [PROD_W-1:0] a, b;

  assign m1 = PROD_W'(mag);
  assign m2 = m1 << 1;
  assign m4 = m1 << 2;
  assign m8 = m1 << 3;

  // two operands of the single adder, zero when unused
  always_comb begin
    unique case (code)
      K2:      begin a = m2; b = '0; end
      K3:      begin a = m1; b = m2; end
      K6:      begin a = m2; b = m4; end
      K8:      begin a = m8; b = '0; end
      K9:      begin a = m1; b = m8; end
      K10:     begin a = m2; b = m8; end
      default: begin a = '0; b = '0; end
    endcase
  end

  assign prod = a + b;

endmodule
