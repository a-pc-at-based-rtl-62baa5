// ias_top: image archiving board for a PC/AT host, built around the 2-D
// integer cosine transform processor.
//
// Forward transform: the host writes a raster image (two pixels per 16-bit
// word) into an input memory module through AG3; a full module (32K words)
// switches loading to the other module. A run (P_GO) feeds the pixels of
// the most recently loaded module to the ICT processor in 8x8 block order
// (AG1), and the 64 coefficients of each block are written as 16-bit words
// into the output memory through AG2, so that each frequency's coefficients
// of 512 consecutive blocks are consecutive; a module full of 512 blocks
// switches writing to the other module. The host reads the coefficients
// back through AG3.
//
// Inverse transform: the host loads packed variable-length codes into input
// memory 1, the address, bit and class maps, and then the quantization
// table into input memory 2 (its load address is stepped under control of
// the bit map, so only the levels in use are written). For each coefficient the inverse transform address
// generator unpacks the code and looks up its level, which goes to the ICT
// processor. Normal operation and low-pass filtering use full 8x8 blocks;
// filtering of degree 2x2, 4x4 or 6x6 accepts the 3, 10 or 21 lowest-
// sequency coefficients (row + column index below 2, 4 or 6) and forces the
// others to zero without fetching them. 2x2 and 4x4 subsampling accept the
// same 3 or 10 coefficients, feed only the lowest 2x2 or 4x4 group and read
// only the lanes of the kept pixels, so a block takes 6 or 20 ROW cycles
// instead of 72. Pixels are written as bytes into
// output memory 1 through AG1, in raster order for the host or in
// frame-buffer order (subsampled pictures tiled on a 256x256 screen). With
// the frame-buffer flag, output memory 1 is then streamed byte by byte to
// the frame buffer port with a write strobe. In album mode AG1 is not
// cleared between runs, so successive pictures fill successive tiles.
//
// Timing: the ICT chip set runs at 1/ROW_DIV of `clk` (ROW is a strobe every
// ROW_DIV clocks, default 8 as on the board); each ROW cycle leaves room for
// the two packed-data accesses and the table lookup of the next code.
// Host writes take effect one clock after the access; a read returns data
// on `h_rdata` two clocks after the access. `busy` is high from P_GO to the
// end of the run (and of the frame-buffer transfer).
//
// The data path, the memory organisation, the three address generators and
// the control fields follow the board description. The controller that
// sequences them, the host port map and commands, the image-size bit and
// the use of output memory 1 for every inverse run are this design's own.
module ias_top
  import ict_pkg::*;
  import ias_pkg::*;
#(
  parameter int unsigned ROW_DIV = 8   // system clocks per ICT ROW cycle
) (
  input  logic        clk,
  input  logic        rst,
  // PC/AT host port
  input  logic        h_wr,
  input  logic        h_rd,
  input  logic [2:0]  h_port,
  input  logic [15:0] h_wdata,
  output logic [15:0] h_rdata,
  output logic        busy,
  // frame buffer port
  output logic        fb_we,
  output logic [7:0]  fb_data,
  output logic [1:0]  fb_plane
);

  // ---------------- input stage and control register ----------------
  ctrl_t       ctrl;
  logic [15:0] hdata;
  logic        img_we, qt_we, amap_ld, bmap_ld, cmap_ld, go, clr;
  logic        rd_stat, rd_out0, rd_out1;

  input_stage u_in (
    .clk, .rst, .h_wr, .h_rd, .h_port, .h_wdata,
    .ctrl, .data(hdata), .img_we, .qt_we, .amap_ld, .bmap_ld, .cmap_ld,
    .go, .clr, .rd_stat, .rd_out0, .rd_out1
  );

  // ---------------- controller state ----------------
  typedef enum logic [1:0] {C_IDLE, C_RUN, C_FB} cstate_e;
  cstate_e     cst;
  logic        fb_half;
  logic        cst_n_fb;   // run ends into a frame-buffer transfer

  // ---------------- AG3: host transfers ----------------
  logic [14:0] ag3_a;
  logic        ag3_wrap, ag3_inc, ag3_clr;
  assign ag3_inc = img_we || qt_we || rd_out0 || rd_out1 || (cst == C_FB && fb_half);
  assign ag3_clr = clr || (cst == C_RUN && cst_n_fb);

  ag3 u_ag3 (.clk, .rst, .clr(ag3_clr), .inc(ag3_inc), .a(ag3_a), .wrap(ag3_wrap));

  // ---------------- input memory ----------------
  logic        in_wbank;   // module receiving image words
  logic        in_rbank;   // module last written, read by a forward run
  always_ff @(posedge clk) begin
    if (rst || clr) begin
      in_wbank <= 1'b0;
      in_rbank <= 1'b0;
    end else if (img_we && !ctrl.inverse) begin
      in_rbank <= in_wbank;
      if (ag3_wrap) in_wbank <= ~in_wbank;
    end
  end

  logic [15:0] ag1_a;
  logic [15:0] pk_addr;
  logic [14:0] qt_addr;
  logic [14:0] qt_ld_addr;     // quantization table load address
  logic [15:0] im_addr [2];
  logic [15:0] im_word [2];
  logic [7:0]  im_byte [2];
  logic        im_we   [2];

  always_comb begin
    for (int m = 0; m < 2; m++) begin
      im_we[m] = 1'b0;
      if (ctrl.inverse)
        im_addr[m] = (m == 0) ? pk_addr : {qt_addr, 1'b0};
      else
        im_addr[m] = ag1_a;
    end
    if (img_we) begin
      if (ctrl.inverse || !in_wbank) begin
        im_we[0] = 1'b1; im_addr[0] = {ag3_a, 1'b0};
      end else begin
        im_we[1] = 1'b1; im_addr[1] = {ag3_a, 1'b0};
      end
    end
    if (qt_we) begin
      im_we[1] = 1'b1; im_addr[1] = {qt_ld_addr, 1'b0};
    end
  end

  for (genvar m = 0; m < 2; m++) begin : g_im
    mem_module u_mod (
      .clk, .addr(im_addr[m]), .we_word(im_we[m]), .we_byte(1'b0),
      .din(hdata), .dout_word(im_word[m]), .dout_byte(im_byte[m])
    );
  end

  // ---------------- operation decode ----------------
  logic       sub2, sub4;
  logic [3:0] n;          // words per group
  logic [3:0] win;        // low-pass degree: coefficients with k + j < win (8 = all)
  ag1_mode_e  ag1_mode;

  assign sub2 = ctrl.inverse && ctrl.subsamp && ctrl.degree == 2'b01;
  assign sub4 = ctrl.inverse && ctrl.subsamp && ctrl.degree == 2'b10;
  assign n    = sub2 ? 4'd2 : sub4 ? 4'd4 : 4'd8;
  always_comb begin
    if (!ctrl.inverse || ctrl.degree == 2'b00) win = 4'd8;
    else                                       win = {1'b0, ctrl.degree, 1'b0};
    if (!ctrl.inverse)
      ag1_mode = ctrl.size512 ? AG_BLK512 : AG_BLK256;
    else if (sub2)
      ag1_mode = ctrl.to_fb ? AG_FB2 : ctrl.size512 ? AG_CPU2_512 : AG_CPU2_256;
    else if (sub4)
      ag1_mode = ctrl.to_fb ? AG_FB4 : ctrl.size512 ? AG_CPU4_512 : AG_CPU4_256;
    else
      ag1_mode = (ctrl.size512 && !ctrl.to_fb) ? AG_BLK512 : AG_BLK256;
  end

  // ---------------- run sequencing ----------------
  logic [$clog2(ROW_DIV)-1:0] ph;
  logic        row;
  logic [3:0]  f_j, f_k;         // slot in group, group in block
  logic [11:0] f_blk, nblk_m1;   // block of this run, blocks-1
  logic [11:0] blk_idx;          // block index for the class map
  logic        feed_done;
  logic [17:0] out_cnt, out_tot;
  logic        proc_rst;
  logic        zero_coef;
  logic        in_win;         // coefficient (f_k, f_j) lies in the accepted set

  assign row = (cst == C_RUN) && (ph == ($clog2(ROW_DIV))'(ROW_DIV - 1));

  // read-out burst of one output step
  logic        burst;
  logic [2:0]  b_cnt;
  logic [2:0]  lane;
  logic [7:0]  oen;
  logic        ovalid, bl;
  word_t       pdout;
  logic        out_we;
  logic [2:0]  b_last;

  assign b_last = sub2 ? 3'd1 : sub4 ? 3'd3 : 3'd7;
  assign lane   = sub2 ? {b_cnt[0], 2'b00} : sub4 ? {b_cnt[1:0], 1'b0} : b_cnt;
  assign oen    = burst ? ~(8'd1 << lane) : 8'hFF;
  assign out_we = burst;

  logic        last_out;
  assign last_out = out_we && (out_cnt + 18'd1 == out_tot);
  assign cst_n_fb = last_out && ctrl.inverse && ctrl.to_fb;

  always_ff @(posedge clk) begin
    if (rst) begin
      cst       <= C_IDLE;
      ph        <= '0;
      f_j       <= '0;
      f_k       <= '0;
      f_blk     <= '0;
      nblk_m1   <= '0;
      blk_idx   <= '0;
      feed_done <= 1'b0;
      out_cnt   <= '0;
      out_tot   <= '0;
      burst     <= 1'b0;
      b_cnt     <= '0;
      fb_half   <= 1'b0;
      zero_coef <= 1'b0;
    end else begin
      unique case (cst)
        C_IDLE: if (go) begin
          cst       <= C_RUN;
          ph        <= '0;
          f_j       <= '0;
          f_k       <= '0;
          f_blk     <= '0;
          nblk_m1   <= hdata[11:0];
          if (!hdata[15]) blk_idx <= '0;
          feed_done <= 1'b0;
          out_cnt   <= '0;
          out_tot   <= (18'(hdata[11:0]) + 18'd1) << (sub2 ? 2 : sub4 ? 4 : 6);
          burst     <= 1'b0;
          b_cnt     <= '0;
        end
        C_RUN: begin
          ph <= (ph == ($clog2(ROW_DIV))'(ROW_DIV - 1)) ? '0 : ph + 1'b1;
          if (ph == '0)
            zero_coef <= !in_win;
          // input feed, in step with the chips' own counters
          if (row && !feed_done) begin
            if (f_j < n) begin
              f_j <= f_j + 4'd1;
            end else begin
              f_j <= '0;
              if (f_k + 4'd1 >= n) begin
                f_k     <= '0;
                f_blk   <= f_blk + 12'd1;
                blk_idx <= blk_idx + 12'd1;
                if (f_blk == nblk_m1) feed_done <= 1'b1;
              end else begin
                f_k <= f_k + 4'd1;
              end
            end
          end
          // output read-out
          if (ovalid && bl && !burst) begin
            burst <= 1'b1;
            b_cnt <= '0;
          end else if (burst) begin
            out_cnt <= out_cnt + 18'd1;
            if (b_cnt == b_last) burst <= 1'b0;
            b_cnt <= b_cnt + 3'd1;
          end
          if (last_out) begin
            burst   <= 1'b0;
            cst     <= (ctrl.inverse && ctrl.to_fb) ? C_FB : C_IDLE;
            fb_half <= 1'b0;
          end
        end
        default: begin  // C_FB: stream output memory 1 to the frame buffer
          fb_half <= ~fb_half;
          if (fb_half && ag3_wrap) cst <= C_IDLE;
        end
      endcase
    end
  end

  assign proc_rst = rst || (cst == C_IDLE && go);
  assign busy     = (cst != C_IDLE);

  // ---------------- AG1 ----------------
  logic [15:0] ag1_q;      // counter value, observed by testbenches
  logic        ag1_inc, ag1_clr;
  assign ag1_clr = (cst == C_IDLE) && go && !ctrl.album;
  assign ag1_inc = ctrl.inverse ? out_we : (row && !feed_done && f_j < n);

  ag1 u_ag1 (
    .clk, .rst, .clr(ag1_clr), .load(1'b0), .load_val(16'd0), .inc(ag1_inc),
    .mode(ag1_mode), .q(ag1_q), .a(ag1_a)
  );

  assign in_win = (win == 4'd8) || ((5'(f_j) + 5'(f_k)) < 5'(win));

  // ---------------- inverse transform address generator ----------------
  word_t       coef;
  logic        coef_done;
  logic        itag_req;
  assign itag_req = ctrl.inverse && (cst == C_RUN) && (ph == '0) && !feed_done &&
                    (f_j < n) && in_win;

  inverse_addr_gen u_itag (
    .clk, .rst, .ld_clr(clr), .ld_amap(amap_ld), .ld_bmap(bmap_ld), .ld_cmap(cmap_ld),
    .ld_data(hdata), .class4(ctrl.class4), .req(itag_req),
    .idx({f_k[2:0], f_j[2:0]}), .blk(blk_idx),
    .pk_addr(pk_addr), .pk_byte(im_byte[0]), .qt_addr(qt_addr), .qt_word(im_word[1]),
    .qt_ld(qt_we), .qt_ld_addr(qt_ld_addr),
    .coef(coef), .done(coef_done)
  );

  // ---------------- ICT processor ----------------
  word_t       din;
  always_comb begin
    if (!ctrl.inverse)  din = {im_byte[in_rbank], 6'd0};
    else if (zero_coef) din = '0;
    else                din = coef;
  end

  ict_processor u_proc (
    .clk, .rst(proc_rst), .row,
    .cy((n == 4'd8) ? 3'd0 : n[2:0]),
    .mode_inv(ctrl.inverse), .mode_2c(!ctrl.inverse),
    .mode_sub(!ctrl.inverse), .mode_add(ctrl.inverse),
    .ds_mode(!(sub2 || sub4)),
    .din, .oen, .dout(pdout), .ovalid, .bl
  );

  // ---------------- AG2 and output memory ----------------
  logic [14:0] ag2_a;
  logic        ag2_wrap, ag2_inc;
  logic        out_wbank;
  assign ag2_inc = out_we && !ctrl.inverse;

  ag2 u_ag2 (
    .clk, .rst, .clr((cst == C_IDLE) && go), .inc(ag2_inc),
    .q(), .a(ag2_a), .wrap(ag2_wrap)
  );

  always_ff @(posedge clk) begin
    if (rst || clr)    out_wbank <= 1'b0;
    else if (ag2_wrap) out_wbank <= ~out_wbank;
  end

  logic [15:0] om_addr [2];
  logic [15:0] om_word [2];
  logic [7:0]  om_byte [2];
  logic        om_wew  [2];
  logic        om_web  [2];
  logic [15:0] om_din;
  logic        wmod;

  assign wmod   = ctrl.inverse ? 1'b0 : out_wbank;
  assign om_din = ctrl.inverse ? {8'd0, pdout[13:6]} : {{2{pdout[13]}}, pdout};

  always_comb begin
    for (int m = 0; m < 2; m++) begin
      om_addr[m] = {ag3_a, (cst == C_FB) ? fb_half : 1'b0};
      om_wew[m]  = 1'b0;
      om_web[m]  = 1'b0;
      if (out_we && wmod == 1'(m)) begin
        om_addr[m] = ctrl.inverse ? ag1_a : {ag2_a, 1'b0};
        om_wew[m]  = !ctrl.inverse;
        om_web[m]  = ctrl.inverse;
      end
    end
  end

  for (genvar m = 0; m < 2; m++) begin : g_om
    mem_module u_mod (
      .clk, .addr(om_addr[m]), .we_word(om_wew[m]), .we_byte(om_web[m]),
      .din(om_din), .dout_word(om_word[m]), .dout_byte(om_byte[m])
    );
  end

  // ---------------- host read-back and frame buffer ----------------
  always_ff @(posedge clk) begin
    if (rst)          h_rdata <= '0;
    else if (rd_stat) h_rdata <= {busy, 11'd0, out_wbank, in_wbank, in_rbank, 1'b0};
    else if (rd_out0) h_rdata <= om_word[0];
    else if (rd_out1) h_rdata <= om_word[1];
  end

  assign fb_we    = (cst == C_FB);
  assign fb_data  = om_byte[0];
  assign fb_plane = ctrl.plane;

  // ROW_DIV must leave time for one code lookup (five clocks) and the
  // read-out of a step.
  initial assert (ROW_DIV >= 6) else $error("ias_top: ROW_DIV must be at least 6");

endmodule
