// ict_processor: 2-D integer cosine transform unit built from 16 ICT chips
// and 8 Data Sequencers.
//
// Lane i (i = 0..7) is a first-stage chip hard-wired to transform vector i, a
// Data Sequencer and a second-stage chip whose vector select comes from that
// Data Sequencer. All first-stage chips take the same input word, so a group
// of N words (one row of an 8x8 block, or one row of coefficients) gives
// eight first-stage results at once, one per lane; lane i's Data Sequencer
// collects its results for the N groups of a block and then plays them to
// its second-stage chip once per output vector. For an input block X fed
// row by row the second-stage chip of lane i delivers, at output step s, the
// element (s, i) of J X J^t (forward) or of J^t X J (inverse), each stage
// dropping 6 LSBs. A normal 8x8 block takes 8 x 9 = 72 ROW cycles in each
// stage, and the stages overlap, so one block leaves every 72 ROW cycles.
// Subsampling with N = 2 or 4 and fast low-pass filtering use shorter
// groups; see data_sequencer.
//
// The eight second-stage outputs share one bus: a chip drives it only while
// its bit of `oen` is low (OEN pins), and the outputs are OR-ed, so exactly
// one bit of `oen` should be low when `dout` is read. All eight results of a
// step are held from the `ovalid` pulse until the next one (N+1 ROW cycles).
//
// The lane structure, the shared inputs and the OEN read-out follow the
// description of the ICT processor; the first-stage chips take MODE3 and
// the second-stage chips MODE4, as the text sets them for forward and
// inverse transform.
module ict_processor
  import ict_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       row,        // ROW strobe to all 16 chips
  input  logic [2:0] cy,         // words per group (CY3..CY1), CT = CY3,CY2
  input  logic       mode_inv,   // MODE1
  input  logic       mode_2c,    // MODE2
  input  logic       mode_sub,   // MODE3 of the first stage
  input  logic       mode_add,   // MODE4 of the second stage
  input  logic       ds_mode,    // Data Sequencer MODE: 1 filtering, 0 subsampling
  input  word_t      din,        // input word to all first-stage chips
  input  logic [7:0] oen,        // OEN of the second-stage chips, active high
  output word_t      dout,       // OR of the enabled second-stage outputs
  output logic       ovalid,     // second-stage results latched (COL of lane 0)
  output logic       bl          // Data Sequencer output valid (lane 0)
);

  word_t      c1 [8];
  word_t      c2 [8];
  word_t      q  [8];
  logic [2:0] s2 [8];
  logic [7:0] col1, lat1, col2, lat2, drv1, drv2, blv;

  for (genvar i = 0; i < 8; i++) begin : g_lane
    ict_chip u_stage1 (
      .clk(clk), .rst(rst), .row(row), .s(3'(i)), .cy(cy),
      .mode_inv(mode_inv), .mode_2c(mode_2c), .mode_sub(mode_sub), .mode_add(1'b0),
      .x(din), .oen(1'b0), .c(c1[i]), .c_drive(drv1[i]),
      .col(col1[i]), .lat(lat1[i])
    );

    data_sequencer u_ds (
      .clk(clk), .rst(rst), .row(row), .col(col1[i]), .lat(lat2[i]),
      .ct(cy[2:1]), .mode(ds_mode), .d(c1[i]),
      .s(s2[i]), .bl(blv[i]), .q(q[i])
    );

    ict_chip u_stage2 (
      .clk(clk), .rst(rst), .row(row), .s(s2[i]), .cy(cy),
      .mode_inv(mode_inv), .mode_2c(mode_2c), .mode_sub(1'b0), .mode_add(mode_add),
      .x(q[i]), .oen(oen[i]), .c(c2[i]), .c_drive(drv2[i]),
      .col(col2[i]), .lat(lat2[i])
    );
  end

  always_comb begin
    dout = '0;
    for (int i = 0; i < 8; i++)
      dout |= c2[i];
  end

  assign ovalid = col2[0];
  assign bl     = blv[0];

endmodule
