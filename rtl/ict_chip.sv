// ict_chip: one-vector engine of the integer cosine transform chip set.
//
// The chip computes one dot product of the 8x8 modified ICT kernel per group
// of input words: in forward transform (mode_inv = 0) the row S of the kernel
// times the input vector, in inverse transform (mode_inv = 1) the column S.
// Eight chips in parallel, or one chip fed the same data eight times, give a
// full 1-D transform.
//
// Blocks, as on the chip:
//  * input stage  - format conversion of the input word: offset binary with
//                   MODE3 (sign bit inverted, i.e. 128 subtracted from a pixel
//                   placed on the top eight bits), else two's complement
//                   (MODE2 = 1) or sign plus 13-bit magnitude (MODE2 = 0).
//  * control      - 3-bit counter advanced by each ROW strobe, sequence
//                   control that ends a group after CY3..CY1 words (0 = 8),
//                   R/C select and decoder turning (S, counter) into a kernel
//                   sign and 3-bit magnitude code.
//  * multiplier   - ict_multiplier, shift-add on the 13-bit magnitude.
//  * accumulator  - 20-bit two's complement adder with feedback register.
//  * output stage - drops the 6 LSBs, converts to the MODE2 format or, with
//                   MODE4, to offset binary (128 added to a pixel), and holds
//                   the result in a latch whose drive is controlled by OEN.
//
// Timing: `row` is a one-clock strobe (the chip's ROW clock as a clock
// enable of `clk`). Words are taken on the first N ROW strobes of a group.
// On the (N+1)th strobe the input is ignored, the result is latched, and
// `col` and `lat` pulse high for the one clock that follows, so a group takes
// N+1 ROW cycles (9 for a normal group). Strobes must be at least two clocks
// apart so a Data Sequencer can react to `lat` before the next ROW.
//
// The pins, the kernel, the modes and the 9-cycle rhythm follow the chip
// description. Choices of this design: the tri-state output is modelled as a
// drive flag with the data forced to zero while disabled (so outputs of
// several chips can be OR-ed onto a bus); a two's complement input of -8192,
// whose magnitude does not fit 13 bits, is taken as -8191; the same clamp is
// applied when a result of -8192 is written in sign-magnitude form.
module ict_chip
  import ict_pkg::*;
(
  input  logic        clk,
  input  logic        rst,        // RESET, active high, synchronous
  input  logic        row,        // ROW strobe
  input  logic [2:0]  s,          // S3..S1 transform vector select
  input  logic [2:0]  cy,         // CY3..CY1 words per group, 0 = 8
  input  logic        mode_inv,   // MODE1: 1 inverse, 0 forward
  input  logic        mode_2c,    // MODE2: 1 two's complement, 0 sign-magnitude
  input  logic        mode_sub,   // MODE3: input in offset binary (-128)
  input  logic        mode_add,   // MODE4: output in offset binary (+128)
  input  word_t       x,          // XSIGN, X12..X0
  input  logic        oen,        // OEN: 1 output disabled
  output word_t       c,          // CSIGN, C12..C0 (zero while disabled)
  output logic        c_drive,    // output enabled
  output logic        col,        // COL strobe, output latch valid
  output logic        lat         // LAT strobe, update S of next stage
);

  logic [3:0]          n;
  logic [3:0]          cnt;
  logic signed [ACC_W-1:0] acc;
  word_t               out_q;

  assign n = group_size(cy);

  // ---------------- input stage ----------------
  logic                in_neg;
  logic [MAG_W-1:0]    in_mag;
  logic signed [WORD_W-1:0] xv;

  always_comb begin
    xv = mode_sub ? signed'({~x[WORD_W-1], x[WORD_W-2:0]}) : signed'(x);
    if (mode_sub || mode_2c) begin
      in_neg = xv[WORD_W-1];
      if (xv == signed'({1'b1, {(WORD_W-1){1'b0}}}))
        in_mag = '1;
      else if (in_neg)
        in_mag = MAG_W'(-xv);
      else
        in_mag = xv[MAG_W-1:0];
    end else begin
      in_neg = x[WORD_W-1];
      in_mag = x[MAG_W-1:0];
    end
  end

  // ---------------- control: R/C select and decoder ----------------
  kelem_t              kel;
  always_comb begin
    if (mode_inv) kel = encode_elem(kernel(cnt[2:0], s));
    else          kel = encode_elem(kernel(s, cnt[2:0]));
  end

  // ---------------- multiplier ----------------
  logic [PROD_W-1:0]   prod;
  ict_multiplier u_mult (.mag(in_mag), .code(kel.mag), .prod(prod));

  // signed product: sign of data times sign of kernel element
  logic signed [ACC_W-1:0] sprod;
  assign sprod = (in_neg ^ kel.neg) ? -signed'(ACC_W'(prod)) : signed'(ACC_W'(prod));

  // ---------------- output formatting ----------------
  logic signed [WORD_W-1:0] t;
  word_t               fmt;
  assign t = acc[ACC_W-1:TRUNC];
  always_comb begin
    if (mode_add)
      fmt = {~t[WORD_W-1], t[WORD_W-2:0]};
    else if (mode_2c)
      fmt = t;
    else if (t == signed'({1'b1, {(WORD_W-1){1'b0}}}))
      fmt = {1'b1, {(WORD_W-1){1'b1}}};
    else if (t[WORD_W-1])
      fmt = {1'b1, MAG_W'(-t)};
    else
      fmt = t;
  end

  // ---------------- counter, accumulator, output latch ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      acc   <= '0;
      out_q <= '0;
      col   <= 1'b0;
      lat   <= 1'b0;
    end else begin
      col <= 1'b0;
      lat <= 1'b0;
      if (row) begin
        if (cnt >= n) begin
          out_q <= fmt;
          col   <= 1'b1;
          lat   <= 1'b1;
          cnt   <= '0;
        end else begin
          acc <= ((cnt == 4'd0) ? '0 : acc) + sprod;
          cnt <= cnt + 4'd1;
        end
      end
    end
  end

  assign c_drive = ~oen;
  assign c       = oen ? '0 : out_q;

endmodule
