// ag1: address generator 1, a 16-bit synchronous counter followed by a
// multiplexer that re-orders the counter bits.
//
// Counter bit Q[2:0] always steps through the words of one transform group
// and the next bits through the groups and the blocks, so data can be fed to
// (or taken from) the ICT processor block by block while the memory holds a
// raster image. Writing A for the address and Q for the counter:
//   AG_BLK256 : A = {Q15..Q11, Q5..Q3, Q10..Q6, Q2..Q0}
//   AG_BLK512 : A = {Q15..Q12, Q5..Q3, Q11..Q6, Q2..Q0}
//   AG_CPU2_256: A = {Q15..Q7, Q1, Q6..Q2, Q0}       (64x64 result)
//   AG_CPU4_256: A = {Q15..Q9, Q3, Q2, Q8..Q4, Q1, Q0} (128x128 result)
//   AG_CPU2_512: A = {Q15..Q8, Q1, Q7..Q2, Q0}
//   AG_CPU4_512: A = {Q15..Q10, Q3, Q2, Q9..Q4, Q1, Q0}
//   AG_FB2    : A = {Q15, Q14, Q11..Q7, Q1, Q13, Q12, Q6..Q2, Q0}
//               sixteen 64x64 images tiled 4x4 on a 256x256 screen
//   AG_FB4    : A = {Q15, Q13..Q9, Q3, Q2, Q14, Q8..Q4, Q1, Q0}
//               four 128x128 images tiled 2x2
// These orders are the ones tabulated for the board. `inc` advances the
// counter by one, `clr` sets it to zero and `load` to `load_val` (used to
// start an album picture at a chosen tile). The address is combinational
// from the counter.
module ag1
  import ias_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        load,
  input  logic [15:0] load_val,
  input  logic        inc,
  input  ag1_mode_e   mode,
  output logic [15:0] q,
  output logic [15:0] a
);

  always_ff @(posedge clk) begin
    if (rst || clr)   q <= '0;
    else if (load)    q <= load_val;
    else if (inc)     q <= q + 16'd1;
  end

  always_comb begin
    unique case (mode)
      AG_BLK256:   a = {q[15:11], q[5:3], q[10:6], q[2:0]};
      AG_BLK512:   a = {q[15:12], q[5:3], q[11:6], q[2:0]};
      AG_CPU2_256: a = {q[15:7], q[1], q[6:2], q[0]};
      AG_CPU4_256: a = {q[15:9], q[3:2], q[8:4], q[1:0]};
      AG_CPU2_512: a = {q[15:8], q[1], q[7:2], q[0]};
      AG_CPU4_512: a = {q[15:10], q[3:2], q[9:4], q[1:0]};
      AG_FB2:      a = {q[15:14], q[11:7], q[1], q[13:12], q[6:2], q[0]};
      default:     a = {q[15], q[13:9], q[3:2], q[14], q[8:4], q[1:0]};
    endcase
  end

endmodule
