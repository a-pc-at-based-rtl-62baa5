// tb_ias_top: end-to-end test of the image archiving board at its default
// parameters, acting as the PC/AT host and as the frame buffer.
//
//  1. Forward transform of a full 256x256 image: 32K DMA words fill input
//     memory 1 (loading switches to module 2), one run transforms the 1024
//     blocks, and all 65536 coefficients are read back from both output
//     modules (which exchange after 512 blocks) and compared with the
//     reference model at their frequency-grouped addresses. The run must
//     take 256*256*9/8 ROW cycles plus the pipeline fill of one block.
//  2. Inverse runs from randomly generated packed codes, bit, class and
//     address maps and quantization table: normal operation with four
//     classes, continuation of the same streams in a second run, 2x2, 4x4
//     and 6x6 low-pass filtering, 2x2 and 4x4 subsampling to the computer,
//     and an album of two 2x2-subsampled pictures sent to the frame buffer,
//     which must land in the first two tiles. Every pixel is compared with
//     the reference model; subsampling runs are timed (6 and 20 ROW cycles
//     per block). Normal and subsampled runs are repeated on a 512-wide
//     image, whose rows need the 512-wide address orders.
// Each mechanism is counted and a mechanism that never happened is a
// failure.
module tb_ias_top;
  import ict_pkg::*;
  import ias_pkg::*;
  import tb_ict_model::*;

  localparam int RD = 8;   // the top's default ROW_DIV

  logic clk = 0, rst = 1;
  logic h_wr = 0, h_rd = 0;
  logic [2:0] h_port = 0;
  logic [15:0] h_wdata = 0, h_rdata;
  logic busy, fb_we;
  logic [7:0] fb_data;
  logic [1:0] fb_plane;

  ias_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img_w = 256;   // width of the image being restored (256 or 512)
  // mechanism counters
  int n_in_swap = 0, n_out_swap = 0, n_fwd = 0, n_normal = 0, n_class4 = 0,
      n_zero_len = 0, n_continue = 0, n_filter = 0, n_sub2 = 0, n_sub4 = 0,
      n_fb = 0, n_album = 0, n_wide = 0, n_qt_words = 0;

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host bus ----------------
  task automatic hwrite(port_e p, int v);
    @(negedge clk); h_wr = 1; h_port = p; h_wdata = 16'(v);
    @(negedge clk); h_wr = 0;
  endtask

  task automatic hread(port_e p, output int v);
    @(negedge clk); h_rd = 1; h_port = p;
    @(negedge clk); h_rd = 0;
    @(negedge clk); v = int'(h_rdata);
  endtask

  function automatic int ctrl_word(bit inv, bit album, int degree, bit sub, bit to_fb, bit c4);
    ctrl_t c;
    c = '0;
    c.inverse = inv; c.album = album; c.degree = 2'(degree); c.subsamp = sub;
    c.to_fb = to_fb; c.class4 = c4; c.plane = 2'd1; c.size512 = (img_w == 512);
    return int'(c);
  endfunction

  // run and time it; poll status for module exchanges
  int last_status;
  task automatic go_and_wait(int nblk_m1, bit keep, output int rows);
    int st, clocks, prev_out;
    hwrite(P_GO, nblk_m1 | (keep ? 16'h8000 : 0));
    clocks = 0;
    prev_out = 0;
    do begin
      repeat (50) @(negedge clk);
      clocks += 50;
      hread(P_CTRL, st);
      clocks += 3;
      if (((st >> 3) & 1) != prev_out) begin n_out_swap++; prev_out = (st >> 3) & 1; end
    end while (st[15] && clocks < 20000000);
    rows = clocks / RD;
    last_status = st;
  endtask

  // ---------------- frame buffer model ----------------
  logic [7:0] fb_mem [65536];
  int fb_ptr = 0;
  always @(posedge clk) if (fb_we) begin
    fb_mem[fb_ptr[15:0]] <= fb_data;
    fb_ptr <= fb_ptr + 1;
  end

  // ---------------- 1. forward transform ----------------
  logic [7:0] img [256][256];

  task automatic forward_test();
    int rows, st, v, e, blkw[8][8], w;
    hwrite(P_CTRL, ctrl_word(0, 0, 0, 0, 0, 0));
    hwrite(P_CLEAR, 0);
    for (int r = 0; r < 256; r++)
      for (int c = 0; c < 256; c++)
        img[r][c] = 8'((r * 3 + c * 5 + $urandom_range(0, 40)) & 255);
    for (int a = 0; a < 32768; a++)
      hwrite(P_IMAGE, {img[a / 128][(a % 128) * 2 + 1], img[a / 128][(a % 128) * 2]});
    hread(P_CTRL, st);
    if (((st >> 2) & 1) == 1) n_in_swap++;     // loading moved to module 2
    checks++;
    if (((st >> 2) & 1) != 1 || ((st >> 1) & 1) != 0) begin
      failures++; $display("input module switching wrong, status %h", st);
    end
    go_and_wait(1023, 0, rows);
    n_fwd++;
    checks++;
    if (rows < 73728 || rows > 73728 + 72 + 20) begin
      failures++; $display("forward run took %0d ROW cycles, expected 73728 + one block", rows);
    end else $display("forward 256x256: %0d ROW cycles (256*256*9/8 = 73728)", rows);
    // read both output modules
    for (int m = 0; m < 2; m++) begin
      hwrite(P_CLEAR, 0);
      for (int a = 0; a < 32768; a++) begin
        int f, b, br, bc;
        hread(m ? P_QTAB : P_IMAGE, v);
        f = a / 512; b = m * 512 + a % 512; br = b / 32; bc = b % 32;
        for (int k = 0; k < 8; k++) for (int j = 0; j < 8; j++)
          blkw[k][j] = int'(img[br * 8 + k][bc * 8 + j]) << 6;
        // coefficient (vertical f/8, horizontal f%8) = lane f%8 at step f/8
        e = proc_out(blkw, 8, 0, f % 8, f / 8, 0, 1, 1, 0);
        w = (e & 16'h2000) ? (e | 16'hC000) : e;
        checks++;
        if (v != w) begin
          failures++;
          if (failures < 10) $display("coef block %0d freq %0d: got %h exp %h", b, f, v, w);
        end
      end
    end
  endtask

  // ---------------- 2. inverse transform ----------------
  int cls [2048];
  int len [4][64];
  int code [2048][64];
  logic [7:0] pk [65536];
  logic [15:0] qt [32768];
  int start_bit [64];
  int end_bit;
  logic [7:0] expect_px [65536];
  bit         expect_set [65536];

  // which coefficients are fed: the n x n group, and of it the low-sequency
  // triangle k + j < win (3, 10 or 21 coefficients for 2x2, 4x4, 6x6)
  function automatic bit needed(int k, int j, int n, int win);
    return k < n && j < n && (win == 8 || k + j < win);
  endfunction

  // Generate codes for blocks [b0, b0+nb) of streams; pack from the given
  // bit positions. When fresh, new stream starts are chosen.
  task automatic make_codes(int b0, int nb, int n, int win, bit c4, bit fresh, int nb_total);
    int bitpos, l;
    if (fresh) begin
      for (int i = 0; i < 65536; i++) pk[i] = 0;
      for (int c = 0; c < 4; c++) for (int i = 0; i < 64; i++)
        len[c][i] = ($urandom_range(0, 5) == 0) ? 0 : $urandom_range(1, 7);
      bitpos = 5;
      for (int i = 0; i < 64; i++) begin
        start_bit[i] = bitpos;
        if (needed(i / 8, i % 8, n, win)) bitpos += 7 * nb_total + 8;
      end
      end_bit = bitpos;
    end
    for (int b = b0; b < b0 + nb; b++) cls[b] = c4 ? $urandom_range(0, 3) : 0;
    for (int i = 0; i < 64; i++) begin
      int pos;
      pos = start_bit[i];
      for (int b = 0; b < b0; b++) pos += len[cls[b]][i] * (needed(i / 8, i % 8, n, win) ? 1 : 0);
      for (int b = b0; b < b0 + nb; b++) begin
        l = len[cls[b]][i];
        code[b][i] = (l == 0) ? 0 : $urandom_range(0, (1 << l) - 1);
        if (needed(i / 8, i % 8, n, win)) begin
          if (l == 0) n_zero_len++;
          if (c4 && cls[b] != 0) n_class4++;
          for (int t = l - 1; t >= 0; t--) begin
            if ((code[b][i] >> t) & 1) pk[pos / 8] = pk[pos / 8] | (8'h80 >> (pos % 8));
            pos++;
          end
        end
      end
    end
  endtask

  task automatic load_all(bit with_amap, int nb_total);
    int words;
    hwrite(P_CLEAR, 0);
    words = end_bit / 16 + 2;
    if (words > 32768) words = 32768;
    for (int a = 0; a < words; a++) hwrite(P_IMAGE, {pk[2 * a + 1], pk[2 * a]});
    hwrite(P_CLEAR, 0);
    if (with_amap)
      for (int i = 0; i < 64; i++) begin
        hwrite(P_AMAP, start_bit[i] & 16'hFFFF);
        hwrite(P_AMAP, start_bit[i] >> 16);
      end
    for (int e = 0; e < 256; e += 2)
      hwrite(P_BMAP, len[e / 64][e % 64] | (len[(e + 1) / 64][(e + 1) % 64] << 4));
    for (int b = 0; b < nb_total; b += 4)
      hwrite(P_CMAP, cls[b] | cls[b + 1] << 2 | cls[b + 2] << 4 | cls[b + 3] << 6);
    // quantization table after the bit map: 2^(L-1) levels per class and
    // type in order, nothing for L = 0
    for (int e = 0; e < 256; e++)
      if (len[e / 64][e % 64] > 0)
        for (int v = 0; v < (1 << (len[e / 64][e % 64] - 1)); v++) begin
          qt[(e << 7) | v] = 16'($urandom_range(0, 3000));
          hwrite(P_QTAB, qt[(e << 7) | v]);
          n_qt_words++;
        end
  endtask

  function automatic int coef_word(int b, int i);
    int l, c;
    l = len[cls[b]][i]; c = code[b][i];
    if (l == 0) return 0;
    return ((c >> (l - 1)) << 13) | ((qt[(cls[b] << 13) | (i << 7) | (c & ((1 << (l - 1)) - 1))] >> 2) & 16'h1FFF);
  endfunction

  // expected pixels of run blocks [b0, b0+nb), stored at positions of run
  // block index rb = b - b0; picture p is the album tile
  task automatic expect_run(int b0, int nb, int n, bit sub, int win, bit to_fb, int p);
    int z[8][8], reps, e, br, bc, rr, cc, pos, lane;
    reps = ds_reps(n, sub);
    for (int b = b0; b < b0 + nb; b++) begin
      for (int k = 0; k < 8; k++) for (int j = 0; j < 8; j++)
        z[k][j] = needed(k, j, n, win) ? coef_word(b, k * 8 + j) : 0;
      br = (b - b0) / (img_w / 8); bc = (b - b0) % (img_w / 8);
      for (int r = 0; r < reps; r++)
        for (int l = 0; l < 8; l++) begin
          if (sub && n == 2 && l % 4 != 0) continue;
          if (sub && n == 4 && l % 2 != 0) continue;
          e = proc_out(z, n, sub, l, r, 1, 0, 0, 1);
          if (!sub) begin rr = br * 8 + r; cc = bc * 8 + l; pos = rr * img_w + cc; end
          else if (n == 2) begin
            rr = br * 2 + r; cc = bc * 2 + l / 4;
            pos = to_fb ? ((p / 4) * 64 + rr) * 256 + (p % 4) * 64 + cc : rr * (img_w / 4) + cc;
          end else begin
            rr = br * 4 + r; cc = bc * 4 + l / 2;
            pos = to_fb ? ((p / 2) * 128 + rr) * 256 + (p % 2) * 128 + cc : rr * (img_w / 2) + cc;
          end
          expect_px[pos] = 8'((e >> 6) & 255);
          expect_set[pos] = 1;
        end
    end
  endtask

  task automatic clear_expect();
    for (int i = 0; i < 65536; i++) expect_set[i] = 0;
  endtask

  task automatic check_computer(string name);
    int v, bad;
    bad = 0;
    hwrite(P_CLEAR, 0);
    for (int a = 0; a < 32768; a++) begin
      if (!expect_set[2 * a] && !expect_set[2 * a + 1]) begin
        if (a > 0 && !expect_set[2 * a - 2] && a % 64 == 0) begin end
      end
      hread(P_IMAGE, v);
      for (int h = 0; h < 2; h++)
        if (expect_set[2 * a + h]) begin
          checks++;
          if (((v >> (8 * h)) & 255) != expect_px[2 * a + h]) begin
            failures++; bad++;
            if (bad < 6) $display("%s: pixel @%0d got %0d exp %0d", name, 2 * a + h, (v >> (8 * h)) & 255, expect_px[2 * a + h]);
          end
        end
    end
    $display("%s: pixels checked", name);
  endtask

  task automatic check_fb(string name);
    int bad;
    bad = 0;
    for (int a = 0; a < 65536; a++)
      if (expect_set[a]) begin
        checks++;
        if (fb_mem[a] != expect_px[a]) begin
          failures++; bad++;
          if (bad < 6) $display("%s: fb @%0d got %0d exp %0d", name, a, fb_mem[a], expect_px[a]);
        end
      end
  endtask

  task automatic inverse_run(string name, int nb, int n, bit sub, int degree, bit c4,
                             int exp_rows_per_blk);
    int rows, win;
    win = (degree == 0) ? 8 : degree * 2;
    hwrite(P_CTRL, ctrl_word(1, 0, degree, sub, 0, c4));
    make_codes(0, nb, n, win, c4, 1, nb);
    load_all(1, nb);
    clear_expect();
    expect_run(0, nb, n, sub, win, 0, 0);
    go_and_wait(nb - 1, 0, rows);
    if (exp_rows_per_blk > 0) begin
      checks++;
      if (rows < nb * exp_rows_per_blk || rows > nb * exp_rows_per_blk + 90) begin
        failures++; $display("%s: %0d ROW cycles for %0d blocks", name, rows, nb);
      end else $display("%s: %0d ROW cycles for %0d blocks (%0d per block)", name, rows, nb, exp_rows_per_blk);
    end
    check_computer(name);
  endtask

  initial begin
    int rows;
    repeat (3) @(negedge clk); rst = 0;

    forward_test();

    // normal, four classes, then the same streams continued in a second run
    hwrite(P_CTRL, ctrl_word(1, 0, 0, 0, 0, 1));
    make_codes(0, 32, 8, 8, 1, 1, 64);
    make_codes(32, 32, 8, 8, 1, 0, 64);
    load_all(1, 64);
    clear_expect(); expect_run(0, 32, 8, 0, 8, 0, 0);
    go_and_wait(31, 0, rows);
    check_computer("inverse normal"); n_normal++;
    clear_expect(); expect_run(32, 32, 8, 0, 8, 0, 0);
    go_and_wait(31, 1, rows);
    check_computer("inverse normal, continued"); n_continue++;
    checks++;
    if (rows < 32 * 72 || rows > 32 * 72 + 90) begin
      failures++; $display("normal inverse: %0d ROW cycles for 32 blocks", rows);
    end

    inverse_run("filter 2x2", 32, 8, 0, 1, 1, 72); n_filter++;
    inverse_run("filter 4x4", 32, 8, 0, 2, 0, 72); n_filter++;
    inverse_run("filter 6x6", 32, 8, 0, 3, 1, 72); n_filter++;
    inverse_run("subsample 2x2", 64, 2, 1, 1, 1, 6); n_sub2++;
    inverse_run("subsample 4x4", 64, 4, 1, 2, 1, 20); n_sub4++;

    // a 512-wide image: two block rows, normal and subsampled
    img_w = 512;
    inverse_run("512-wide normal", 128, 8, 0, 0, 1, 72); n_wide++;
    inverse_run("512-wide subsample 2x2", 128, 2, 1, 1, 0, 6); n_wide++;
    inverse_run("512-wide subsample 4x4", 128, 4, 1, 2, 0, 20); n_wide++;
    img_w = 256;

    // album: two full 256x256 pictures at 2x2 subsampling to the frame buffer
    clear_expect();
    for (int p = 0; p < 2; p++) begin
      // the first picture starts the album (AG1 cleared), the second continues it
      hwrite(P_CTRL, ctrl_word(1, p > 0, 1, 1, 1, 0));
      make_codes(0, 1024, 2, 2, 0, 1, 1024);
      load_all(1, 1024);
      expect_run(0, 1024, 2, 1, 2, 1, p);
      fb_ptr = 0;
      go_and_wait(1023, 0, rows);
      checks++;
      if (fb_ptr != 65536) begin failures++; $display("frame buffer got %0d bytes", fb_ptr); end
      else n_fb++;
      checks++;
      if (fb_plane != 2'd1) begin failures++; $display("colour plane not passed on"); end
    end
    check_fb("album");
    n_album++;

    // every mechanism must have happened
    begin
      int cnt [13];
      string nm [13];
      cnt = '{n_in_swap, n_out_swap, n_fwd, n_normal, n_class4, n_zero_len, n_continue,
              n_filter, n_sub2, n_sub4, n_fb, n_album, n_wide};
      nm = '{"input module switch", "output module exchange", "forward run", "normal inverse",
             "class-map lookups", "zero-length codes", "stream continuation", "low-pass filtering",
             "2x2 subsampling", "4x4 subsampling", "frame buffer transfer", "album tiling",
             "512-wide address orders"};
      for (int i = 0; i < 13; i++) begin
        $display("mechanism %-24s happened %0d times", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
