// tb_ag2: counts address generator 2 through two full module fills and
// checks that coefficient f of block b lands at word f*512 + b mod 512,
// that all 32K addresses of a fill are distinct, and that `wrap` pulses
// exactly once per 512 blocks.
module tb_ag2;
  logic clk = 0, rst = 1, clr = 0, inc = 0;
  logic [14:0] q, a;
  logic wrap;
  int checks = 0, failures = 0, wraps = 0;
  bit seen [32768];

  ag2 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    inc = 1;
    for (int n = 0; n < 65536; n++) begin
      int blk, f;
      blk = (n / 64) % 512; f = n % 64;
      #1;
      checks++;
      if (int'(a) != f * 512 + blk) begin
        failures++;
        if (failures < 10) $display("write %0d: a=%0d exp %0d", n, a, f * 512 + blk);
      end
      if (n < 32768) begin
        if (seen[a]) begin failures++; $display("address %0d reused", a); end
        seen[a] = 1;
      end
      if (wrap) begin
        wraps++;
        checks++;
        if (n % 32768 != 32767) begin failures++; $display("wrap at %0d", n); end
      end
      @(negedge clk);
    end
    inc = 0;
    checks++; if (wraps != 2) begin failures++; $display("%0d wraps", wraps); end
    clr = 1; @(negedge clk); clr = 0;
    checks++; if (q != 0) begin failures++; $display("clear failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
