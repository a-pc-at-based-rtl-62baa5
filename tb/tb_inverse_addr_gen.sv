// tb_inverse_addr_gen: self-checking test of the code unpacker.
//
// The testbench draws a random class for every block and a random code
// length (0..8 bits) for every (class, coefficient type), packs random codes
// MSB first into one bit stream per coefficient type in block order, loads
// the address map with the stream start addresses and the bit and class
// maps through the loading ports, and keeps packed data and quantization
// table in its own arrays answering the module's addresses. It then asks
// for every coefficient of every block, in block order, and checks the
// sign-magnitude result, the five-clock latency, and that both the
// four-class and the one-class setting address the right table entries.
// It also steps the quantization table load address through every class
// and type and checks it against the bit map (2^(L-1) levels per entry,
// none for L = 0).
module tb_inverse_addr_gen;
  import ict_pkg::*;

  localparam int NB = 64;   // blocks

  logic clk = 0, rst = 1;
  logic ld_clr = 0, ld_amap = 0, ld_bmap = 0, ld_cmap = 0;
  logic [15:0] ld_data = 0;
  logic class4 = 1, req = 0;
  logic [5:0] idx = 0;
  logic [11:0] blk = 0;
  logic [15:0] pk_addr;
  logic [7:0]  pk_byte;
  logic [14:0] qt_addr;
  logic [15:0] qt_word;
  logic        qt_ld = 0;
  logic [14:0] qt_ld_addr;
  word_t coef;
  logic done;
  int checks = 0, failures = 0;

  inverse_addr_gen dut (.*);
  always #5 clk = ~clk;

  logic [7:0]  pmem [65536];
  logic [15:0] qmem [32768];
  assign pk_byte = pmem[pk_addr];
  assign qt_word = qmem[qt_addr];

  int cls_of [NB];
  int len_of [4][64];
  int code_of [NB][64];
  int start_bit [64];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put_bit(int pos, int b);
    if (b) pmem[pos / 8] = pmem[pos / 8] | (8'h80 >> (pos % 8));
  endtask

  task automatic write(ref logic strobe, input int v);
    ld_data = 16'(v); strobe = 1; @(negedge clk); strobe = 0;
  endtask

  task automatic run_pass(bit four);
    int bitpos, lat, l, e, c;
    class4 = four;
    for (int i = 0; i < 65536; i++) pmem[i] = 8'h00;
    for (int i = 0; i < 32768; i++) qmem[i] = 16'($urandom);
    for (int b = 0; b < NB; b++) cls_of[b] = four ? $urandom_range(0, 3) : 0;
    for (int c2 = 0; c2 < 4; c2++) for (int i = 0; i < 64; i++) len_of[c2][i] = $urandom_range(0, 8);
    // pack: stream i holds the codes of all blocks, block order
    bitpos = 3;   // streams need not start on a byte boundary
    for (int i = 0; i < 64; i++) begin
      start_bit[i] = bitpos;
      for (int b = 0; b < NB; b++) begin
        l = len_of[cls_of[b]][i];
        code_of[b][i] = (l == 0) ? 0 : $urandom_range(0, (1 << l) - 1);
        for (int t = l - 1; t >= 0; t--) begin
          put_bit(bitpos, (code_of[b][i] >> t) & 1); bitpos++;
        end
      end
      bitpos += $urandom_range(0, 9);
    end
    // load maps
    ld_clr = 1; @(negedge clk); ld_clr = 0;
    for (int i = 0; i < 64; i++) begin
      write(ld_amap, start_bit[i] & 16'hFFFF);
      write(ld_amap, start_bit[i] >> 16);
    end
    for (int e2 = 0; e2 < 256; e2 += 2)
      write(ld_bmap, len_of[e2 / 64][e2 % 64] | (len_of[(e2 + 1) / 64][(e2 + 1) % 64] << 4));
    for (int b = 0; b < 4096; b += 4)
      write(ld_cmap, (b < NB) ? (cls_of[b] | cls_of[b+1] << 2 | cls_of[b+2] << 4 | cls_of[b+3] << 6) : 0);
    // quantization table loading: 2^(L-1) levels per class and type in
    // order, types of length 0 skipped
    for (int e2 = 0; e2 < 256; e2++)
      if (len_of[e2 / 64][e2 % 64] > 0)
        for (int v = 0; v < (1 << (len_of[e2 / 64][e2 % 64] - 1)); v++) begin
          checks++;
          if (int'(qt_ld_addr) != ((e2 << 7) | v)) begin
            failures++;
            if (failures < 10) $display("table load address %h, expected %h", qt_ld_addr, (e2 << 7) | v);
          end
          qt_ld = 1; @(negedge clk); qt_ld = 0;
        end
    // look up every coefficient
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 64; i++) begin
        idx = 6'(i); blk = 12'(b); req = 1; @(negedge clk); req = 0;
        lat = 1;
        while (!done && lat < 20) begin @(negedge clk); lat++; end
        checks++;
        if (lat != 5) begin failures++; $display("latency %0d", lat); end
        l = len_of[cls_of[b]][i];
        c = code_of[b][i];
        if (l == 0) e = 0;
        else e = ((c >> (l - 1)) << 13) |
                 ((qmem[(cls_of[b] << 13) | (i << 7) | (c & ((1 << (l - 1)) - 1))] >> 2) & 16'h1FFF);
        checks++;
        if (int'(coef) != e) begin
          failures++;
          if (failures < 10) $display("blk %0d idx %0d len %0d code %h: got %h exp %h", b, i, l, c, coef, e);
        end
      end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    run_pass(1);
    run_pass(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
