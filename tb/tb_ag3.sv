// tb_ag3: checks that address generator 3 counts up by one per increment,
// holds without one, wraps after 32K words with a single `wrap` pulse, and
// clears.
module tb_ag3;
  logic clk = 0, rst = 1, clr = 0, inc = 0;
  logic [14:0] a;
  logic wrap;
  int checks = 0, failures = 0, wraps = 0;

  ag3 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int n = 0; n < 70000; n++) begin
      inc = (n % 3 != 2);
      #1;
      if (wrap) begin
        wraps++;
        checks++;
        if (expv != 32767) begin failures++; $display("wrap at %0d", expv); end
      end
      @(negedge clk);
      if (inc) expv = (expv + 1) % 32768;
      checks++;
      if (int'(a) != expv) begin
        failures++;
        if (failures < 10) $display("step %0d: a=%0d exp %0d", n, a, expv);
      end
    end
    inc = 0;
    checks++; if (wraps != 1) begin failures++; $display("%0d wraps", wraps); end
    clr = 1; @(negedge clk); clr = 0;
    checks++; if (a != 0) begin failures++; $display("clear failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
