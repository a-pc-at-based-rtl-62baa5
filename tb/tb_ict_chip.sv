// tb_ict_chip: self-checking test of one ICT chip.
//
// Runs random groups through the chip in forward and inverse mode, every
// transform vector, group sizes 2, 4, 6 and 8 and every input/output format
// (two's complement, sign-magnitude, MODE3 offset input, MODE4 offset
// output), and compares the latched result with the reference model. It
// checks that COL and LAT pulse once per group, on the clock after the
// (N+1)th ROW strobe, that OEN disables the output, and that a normal group
// takes 9 ROW cycles.
module tb_ict_chip;
  import ict_pkg::*;
  import tb_ict_model::*;

  logic clk = 0, rst = 1, row = 0;
  logic [2:0] s = 0, cy = 0;
  logic mode_inv = 0, mode_2c = 1, mode_sub = 0, mode_add = 0;
  word_t x = '0;
  logic oen = 0;
  word_t c;
  logic c_drive, col, lat;
  int checks = 0, failures = 0;

  ict_chip dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic strobe();
    @(negedge clk); row = 1; @(negedge clk); row = 0;
  endtask

  initial begin
    int xs[8];
    int n, e, rows, pulses;
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 600; t++) begin
      n = (t % 4 + 1) * 2;
      cy = (n == 8) ? 3'd0 : 3'(n);
      s = 3'($urandom_range(0, 7));
      mode_inv = $urandom_range(0, 1);
      mode_2c  = $urandom_range(0, 1);
      mode_sub = (t % 5 == 0);
      mode_add = (t % 7 == 0);
      for (int j = 0; j < 8; j++) xs[j] = $urandom_range(0, 16383);
      rows = 0; pulses = 0;
      for (int j = 0; j < n; j++) begin
        x = word_t'(xs[j]); strobe(); rows++;
        if (col || lat) pulses++;
      end
      x = word_t'($urandom);   // ignored on the result cycle
      strobe(); rows++;
      // col/lat are high in the clock after the strobe
      checks++;
      if (!(col && lat) || pulses != 0) begin
        failures++; $display("group %0d: COL/LAT timing wrong", t);
      end
      e = chip_group(xs, n, s, mode_inv, mode_2c, mode_sub, mode_add);
      checks++;
      if (int'(c) != e) begin
        failures++;
        if (failures < 10) $display("group %0d n=%0d s=%0d inv=%0d 2c=%0d sub=%0d add=%0d: got %h exp %h",
                                    t, n, s, mode_inv, mode_2c, mode_sub, mode_add, c, e);
      end
      if (n == 8) begin
        checks++;
        if (rows != 9) begin failures++; $display("normal group took %0d ROW cycles", rows); end
      end
      if (t % 50 == 0) begin
        oen = 1; #1;
        checks++;
        if (c !== '0 || c_drive) begin failures++; $display("OEN does not disable output"); end
        oen = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
