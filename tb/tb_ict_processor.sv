// tb_ict_processor: self-checking test of the 2-D ICT processor.
//
// Streams random 8x8 blocks, back to back, through the 16-chip processor in
// seven operations - forward transform, inverse transform, 2x2 and 4x4
// subsampling, and fast 2x2, 4x4 and 6x6 low-pass filtering with idle
// groups - reads the
// eight second-stage chips one at a time through OEN after every result
// strobe, and compares each word with the reference model. It also checks
// the block period in ROW cycles (72 normal, 6 and 20 for subsampling, 24,
// 40 and 56 for filtering: 1/3, 5/9 and 7/9 of normal).
module tb_ict_processor;
  import ict_pkg::*;
  import tb_ict_model::*;

  localparam int RD = 4;       // clocks per ROW cycle
  localparam int NBLK = 4;

  logic clk = 0, rst = 1, row = 0;
  logic [2:0] cy = 0;
  logic mode_inv = 0, mode_2c = 1, mode_sub = 1, mode_add = 0, ds_mode = 1;
  word_t din = '0;
  logic [7:0] oen = 8'hFF;
  word_t dout;
  logic ovalid, bl;

  int checks = 0, failures = 0;

  ict_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int blocks [NBLK][8][8];
  int stream [$];
  int rowcount;
  int step_row [$];
  int got [$][8];

  // one operation: build input stream, play it, capture steps, compare
  task automatic run_op(string name, int n, bit sub, bit inv, int groups_per_block,
                        int exp_period);
    int steps_expected, reps, t, b, r;
    int w[8];
    stream.delete(); step_row.delete(); got.delete();
    for (int b2 = 0; b2 < NBLK; b2++)
      for (int k = 0; k < 8; k++)
        for (int j = 0; j < 8; j++) begin
          if (!inv) blocks[b2][k][j] = {$urandom_range(0,255), 6'd0};
          else begin
            // sign-magnitude coefficients of moderate size
            int m = $urandom_range(0, 1200);
            blocks[b2][k][j] = ($urandom_range(0,1) ? 16'h2000 : 0) | m;
          end
        end
    for (int b2 = 0; b2 < NBLK; b2++)
      for (int g = 0; g < groups_per_block; g++) begin
        for (int j = 0; j < n; j++) stream.push_back(g < n ? blocks[b2][g][j] : 0);
        stream.push_back(0);   // result cycle of the chips
      end
    cy = (n == 8) ? 3'd0 : 3'(n);
    ds_mode = !sub;
    mode_inv = inv; mode_2c = !inv; mode_sub = !inv; mode_add = inv;
    rst = 1; repeat (3) @(negedge clk); rst = 0;
    reps = ds_reps(n, sub);
    steps_expected = NBLK * reps;
    rowcount = 0;
    fork
      begin : feeder
        while (got.size() < steps_expected) begin
          din = (rowcount < stream.size()) ? word_t'(stream[rowcount]) : '0;
          repeat (RD - 1) @(negedge clk);
          row = 1; @(negedge clk); row = 0;
          rowcount++;
        end
      end
      begin : reader
        while (got.size() < steps_expected) begin
          @(negedge clk);
          if (ovalid && bl) begin
            int v[8];
            step_row.push_back(rowcount);
            for (int l = 0; l < 8; l++) begin
              oen = ~(8'd1 << l);
              #1 v[l] = int'(dout);
              @(negedge clk);
            end
            oen = 8'hFF;
            got.push_back(v);
          end
        end
      end
    join
    // compare
    for (t = 0; t < steps_expected; t++) begin
      b = t / reps; r = t % reps;
      for (int l = 0; l < 8; l++) begin
        int e = proc_out(blocks[b], n, sub, l, r, inv, !inv, !inv, inv);
        checks++;
        if (got[t][l] !== e) begin
          failures++;
          if (failures < 10)
            $display("%s: block %0d step %0d lane %0d got %h exp %h", name, b, r, l, got[t][l], e);
        end
      end
    end
    // block period: rows between first steps of consecutive blocks
    checks++;
    if (step_row[2*reps] - step_row[reps] != exp_period) begin
      failures++;
      $display("%s: block period %0d rows, expected %0d", name, step_row[2*reps] - step_row[reps], exp_period);
    end else
      $display("%s: block period %0d ROW cycles", name, exp_period);
  endtask

  initial begin
    @(posedge clk);
    run_op("forward",     8, 0, 0, 8, 72);
    run_op("inverse",     8, 0, 1, 8, 72);
    run_op("subsample2",  2, 1, 1, 2, 6);
    run_op("subsample4",  4, 1, 1, 4, 20);
    run_op("filter2",     2, 0, 1, 8, 24);
    run_op("filter4",     4, 0, 1, 8, 40);
    run_op("filter6",     6, 0, 1, 8, 56);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
