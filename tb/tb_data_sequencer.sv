// tb_data_sequencer: self-checking test of the Data Sequencer on its own.
//
// The testbench plays the two ICT chips around it: it pulses COL with a new
// word at the end of every first-stage group and LAT at the end of every
// second-stage group (ROW strobes every 3 clocks), and checks that each
// block of N words is played back in order, once per repetition, with the
// S3..S1 sequence 0..7 (filtering/normal), 0,4 (2x2 subsampling) or
// 0,2,4,6 (4x4 subsampling), that BL marks the play phase, and that the
// idle groups of fast filtering are not stored.
module tb_data_sequencer;
  import ict_pkg::*;
  import tb_ict_model::*;

  logic clk = 0, rst = 1, row = 0, col = 0, lat = 0;
  logic [1:0] ct = 0;
  logic mode = 1;
  word_t d = '0;
  logic [2:0] s;
  logic bl;
  word_t q;
  int checks = 0, failures = 0;

  data_sequencer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one configuration: nb blocks; first stage sends gpb groups per block,
  // of which the first n carry data
  task automatic run(int n, bit sub, int gpb, int nb);
    int data [$];
    int reps, g, blk, rep, slot, seen_reps;
    int exp_q;
    ct = (n == 8) ? 2'd0 : 2'(n / 2);
    mode = !sub;
    reps = ds_reps(n, sub);
    rst = 1; repeat (2) @(negedge clk); rst = 0;
    seen_reps = 0;
    for (int i = 0; i < nb * 8; i++) data.push_back($urandom_range(0, 16383));
    // group slots; each slot is n+1 ROW strobes; at its end COL and LAT
    for (g = 0; g < (nb + 1) * gpb + 2; g++) begin
      // during this slot the second chip reads words 0..n-1
      for (slot = 0; slot <= n; slot++) begin
        @(negedge clk);
        if (bl && slot < n && g >= 1) begin
          blk = seen_reps / reps;
          rep = seen_reps % reps;
          if (blk < nb) begin
            exp_q = data[blk * 8 + slot];
            checks++;
            if (int'(q) != exp_q) begin
              failures++;
              if (failures < 10) $display("n=%0d sub=%0d blk %0d rep %0d word %0d: got %h exp %h",
                                          n, sub, blk, rep, slot, q, exp_q);
            end
            if (slot == 0) begin
              checks++;
              if (int'(s) != ds_pattern(rep, n, sub)) begin
                failures++; $display("n=%0d sub=%0d rep %0d: S=%0d exp %0d", n, sub, rep, s, ds_pattern(rep, n, sub));
              end
            end
          end
        end
        row = 1; @(negedge clk); row = 0;
      end
      if (bl) seen_reps++;
      // results of both chips' groups: first stage word for this slot
      blk = g / gpb;
      d = (g % gpb < n && blk < nb) ? word_t'(data[blk * 8 + g % gpb]) : word_t'(16'h1555);
      col = 1; lat = 1; @(negedge clk); col = 0; lat = 0;
    end
    checks++;
    if (seen_reps < nb * reps) begin
      failures++; $display("n=%0d sub=%0d: only %0d repetitions played", n, sub, seen_reps);
    end
  endtask

  initial begin
    @(posedge clk);
    run(8, 0, 8, 3);
    run(2, 1, 2, 3);
    run(4, 1, 4, 3);
    run(2, 0, 8, 3);
    run(6, 0, 8, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
