// data_sequencer: intermediate storage between the two ICT stages of a 2-D
// transform.
//
// Two identical blocks of 8 x 14-bit storage work alternately: one is filled
// with the results of a first-stage ICT chip (one word per `col` strobe)
// while the other plays its contents to a second-stage chip, one word per
// ROW strobe, repeating the set once for every transform vector the second
// chip must compute. Each storage is an 8-deep shift register with an output
// multiplexer: after N words have been shifted in, word p is found at stage
// N-1-p, so reduced groups (filtering, subsampling) need no re-ordering.
//
// Group size N comes from CT2,CT1 (taken as CY3,CY2 with CY1 = 0, so 00 = 8,
// 01 = 2, 10 = 4, 11 = 6). With MODE = 1 (low-pass filtering, and normal
// operation when N = 8) the set is played eight times with S3..S1 = 0..7.
// With MODE = 0 (subsampling) and N = 2 or 4 it is played N times with
// S = 0,4 or S = 0,2,4,6, selecting the output positions kept by the
// subsampling; other group sizes then behave as filtering.
//
// Timing: a fill block that has received N words swaps with the play block
// as soon as the play block has finished its last repetition, possibly in
// the same clock. A repetition lasts N+1 ROW strobes (the second chip's
// group plus its result cycle) and is closed by `lat` from the second chip,
// which also advances S. The fill block takes a word only when the play
// block will have finished by the time the fill block is complete (its
// remaining repetitions are at most the words still needed less one);
// earlier words - the results of the idle groups inserted into the first
// stage during fast filtering - are dropped, so the fill block receives the
// last N results before the swap. BL is high while a block is being played; Q is
// zero when no valid word is presented.
//
// Storage structure, pins and the S patterns follow the chip description; the
// CT encoding, the dropping of surplus words and the swap rule are this
// design's choices.
module data_sequencer
  import ict_pkg::*;
(
  input  logic       clk,
  input  logic       rst,       // RESET: clears S3..S1, BL and the blocks
  input  logic       row,       // ROW: clock data out
  input  logic       col,       // COL: latch data in
  input  logic       lat,       // LAT: next S3..S1
  input  logic [1:0] ct,        // CT2, CT1
  input  logic       mode,      // 1 low-pass filtering, 0 subsampling
  input  word_t      d,         // I13..I0
  output logic [2:0] s,         // S3..S1 for the second-stage chip
  output logic       bl,        // output valid
  output word_t      q          // Q13..Q0
);

  logic [3:0] n;
  assign n = group_size({ct, 1'b0});

  logic       sub2, sub4;
  logic [3:0] reps;
  assign sub2 = !mode && (n == 4'd2);
  assign sub4 = !mode && (n == 4'd4);
  assign reps = sub2 ? 4'd2 : sub4 ? 4'd4 : 4'd8;

  function automatic logic [2:0] pattern(input logic [3:0] r, input logic p2, input logic p4);
    if (p2)      return {r[0], 2'b00};
    else if (p4) return {r[1:0], 1'b0};
    else         return r[2:0];
  endfunction

  word_t      sr [2][8];     // two shift-register storage blocks
  logic       wbank;         // block being filled
  logic [3:0] wcnt;          // words in the fill block
  logic       full;
  logic       busy;          // play block active (BL)
  logic [3:0] rep;
  logic [3:0] rd;

  logic       take, full_n, last_rep, busy_n, swap;
  logic [3:0] rep_n;
  assign last_rep = lat && busy && (rep + 4'd1 >= reps);
  assign busy_n   = busy && !last_rep;
  assign rep_n    = (lat && busy) ? rep + 4'd1 : rep;
  // take a word only if the play block will be done by the time the fill
  // block is complete: remaining repetitions <= words still needed - 1
  assign take     = col && !full &&
                    (!busy_n || ((reps - rep_n) + wcnt + 4'd1 <= n));
  assign full_n   = full || (take && (wcnt + 4'd1 >= n));
  assign swap     = full_n && !busy_n;

  always_ff @(posedge clk) begin
    if (rst) begin
      wbank <= 1'b0;
      wcnt  <= '0;
      full  <= 1'b0;
      busy  <= 1'b0;
      rep   <= '0;
      rd    <= '0;
      s     <= '0;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < 8; i++)
          sr[b][i] <= '0;
    end else begin
      if (take) begin
        sr[wbank][0] <= d;
        for (int i = 1; i < 8; i++)
          sr[wbank][i] <= sr[wbank][i-1];
      end
      if (swap) begin
        wbank <= ~wbank;
        wcnt  <= '0;
        full  <= 1'b0;
        busy  <= 1'b1;
        rep   <= '0;
        rd    <= '0;
        s     <= pattern(4'd0, sub2, sub4);
      end else begin
        if (take) begin
          wcnt <= wcnt + 4'd1;
          full <= full_n;
        end
        if (lat && busy) begin
          rep <= rep + 4'd1;
          rd  <= '0;
          s   <= last_rep ? 3'd0 : pattern(rep + 4'd1, sub2, sub4);
          busy <= busy_n;
        end else if (row && busy && rd < n) begin
          rd <= rd + 4'd1;
        end
      end
    end
  end

  logic [3:0] tap;
  assign tap = n - 4'd1 - rd;
  assign bl  = busy;
  assign q   = (busy && rd < n) ? sr[~wbank][tap[2:0]] : '0;

endmodule
