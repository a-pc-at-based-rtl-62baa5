// tb_ict_model: reference model of the ICT chip set arithmetic for the
// testbenches, written from the transform definition rather than from the
// RTL: the modified ICT(10,9,6,2,3,1) kernel with R = 8 and M = 3, 14-bit
// pin words, a 20-bit accumulator and a 6-bit truncation per chip.
package tb_ict_model;

  // rows of the modified kernel
  const int KT [8][8] = '{
    '{ 8,  8,  8,  8,  8,  8,  8,  8},
    '{10,  9,  6,  2, -2, -6, -9,-10},
    '{ 9,  3, -3, -9, -9, -3,  3,  9},
    '{ 9, -2,-10, -6,  6, 10,  2, -9},
    '{ 8, -8, -8,  8,  8, -8, -8,  8},
    '{ 6,-10,  2,  9, -9, -2, 10, -6},
    '{ 3, -9,  9, -3, -3,  9, -9,  3},
    '{ 2, -6,  9,-10, 10, -9,  6, -2}
  };

  // signed value of a 14-bit pin word
  function automatic int word_value(int w, bit m2c, bit msub);
    int v;
    w = w & 16'h3FFF;
    if (msub) w = w ^ 16'h2000;
    if (msub || m2c) begin
      v = (w >= 8192) ? w - 16384 : w;
      if (v == -8192) v = -8191;      // magnitude limited to 13 bits
    end else begin
      v = (w & 16'h1FFF);
      if (w & 16'h2000) v = -v;
    end
    return v;
  endfunction

  // one chip group: N words, transform vector s; returns the 14-bit pin word
  function automatic int chip_group(int xs[8], int n, int s, bit inv,
                                    bit m2c, bit msub, bit madd);
    longint acc;
    int t, r;
    acc = 0;
    for (int c = 0; c < n; c++)
      acc += longint'(inv ? KT[c][s] : KT[s][c]) * word_value(xs[c], m2c, msub);
    // 20-bit wrap, then drop 6 LSBs
    acc = acc & 20'hFFFFF;
    if (acc >= 524288) acc -= 1048576;
    t = int'(acc >>> 6);
    if (madd)       r = (t + 8192) & 16'h3FFF;
    else if (m2c)   r = t & 16'h3FFF;
    else if (t < 0) r = 16'h2000 | ((t == -8192) ? 8191 : -t);
    else            r = t;
    return r;
  endfunction

  // output position selected at step r of a Data Sequencer
  function automatic int ds_pattern(int r, int n, bit sub);
    if (sub && n == 2) return r * 4;
    if (sub && n == 4) return r * 2;
    return r;
  endfunction

  function automatic int ds_reps(int n, bit sub);
    return (sub && (n == 2 || n == 4)) ? n : 8;
  endfunction

  // Full 2-D processor result, lane i at output step r, for an input block
  // given as rows blk[k][j] of pin words (only k, j < n are used).
  function automatic int proc_out(int blk[8][8], int n, bit sub, int i, int r,
                                  bit inv, bit m2c, bit msub, bit madd);
    int y[8];
    int row[8];
    for (int k = 0; k < 8; k++) y[k] = 0;
    for (int k = 0; k < n; k++) begin
      for (int j = 0; j < 8; j++) row[j] = blk[k][j];
      y[k] = chip_group(row, n, i, inv, m2c, msub, 1'b0);
    end
    return chip_group(y, n, ds_pattern(r, n, sub), inv, m2c, 1'b0, madd);
  endfunction

endpackage
