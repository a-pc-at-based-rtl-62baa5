// tb_ag1: checks every address order of address generator 1 against the
// image position it must reach, computed from block, group and word numbers
// (not from bit lists), plus counting, clear and load.
module tb_ag1;
  import ias_pkg::*;
  logic clk = 0, rst = 1, clr = 0, load = 0, inc = 0;
  logic [15:0] load_val = 0;
  ag1_mode_e mode = AG_BLK256;
  logic [15:0] q, a;
  int checks = 0, failures = 0;

  ag1 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_addr(ag1_mode_e m, int v);
    int j, k, bc, br, img, lr, lc;
    case (m)
      AG_BLK256: begin j = v & 7; k = (v >> 3) & 7; bc = (v >> 6) & 31; br = v >> 11;
                       return (br * 8 + k) * 256 + bc * 8 + j; end
      AG_BLK512: begin j = v & 7; k = (v >> 3) & 7; bc = (v >> 6) & 63; br = v >> 12;
                       return (br * 8 + k) * 512 + bc * 8 + j; end
      AG_CPU2_256: begin j = v & 1; k = (v >> 1) & 1; bc = (v >> 2) & 31; br = v >> 7;
                       return (br * 2 + k) * 64 + bc * 2 + j; end
      AG_CPU4_256: begin j = v & 3; k = (v >> 2) & 3; bc = (v >> 4) & 31; br = v >> 9;
                       return (br * 4 + k) * 128 + bc * 4 + j; end
      AG_CPU2_512: begin j = v & 1; k = (v >> 1) & 1; bc = (v >> 2) & 63; br = v >> 8;
                       return (br * 2 + k) * 128 + bc * 2 + j; end
      AG_CPU4_512: begin j = v & 3; k = (v >> 2) & 3; bc = (v >> 4) & 63; br = v >> 10;
                       return (br * 4 + k) * 256 + bc * 4 + j; end
      AG_FB2: begin j = v & 1; k = (v >> 1) & 1; bc = (v >> 2) & 31; br = (v >> 7) & 31;
                    img = v >> 12; lr = br * 2 + k; lc = bc * 2 + j;
                    return ((img / 4) * 64 + lr) * 256 + (img % 4) * 64 + lc; end
      default: begin j = v & 3; k = (v >> 2) & 3; bc = (v >> 4) & 31; br = (v >> 9) & 31;
                    img = v >> 14; lr = br * 4 + k; lc = bc * 4 + j;
                    return ((img / 2) * 128 + lr) * 256 + (img % 2) * 128 + lc; end
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    // every counter value through the load input, every order
    for (int md = 0; md < 8; md++) begin
      mode = ag1_mode_e'(md);
      for (int v = 0; v < 65536; v += 7) begin
        load = 1; load_val = 16'(v); @(negedge clk); load = 0;
        checks++;
        if (int'(a) != expect_addr(mode, v)) begin
          failures++;
          if (failures < 10) $display("mode %0d q=%h: a=%h exp %h", md, v, a, expect_addr(mode, v));
        end
      end
    end
    // counting and clear
    clr = 1; @(negedge clk); clr = 0;
    inc = 1; repeat (1000) @(negedge clk); inc = 0;
    checks++; if (q != 16'd1000) begin failures++; $display("count %0d", q); end
    clr = 1; @(negedge clk); clr = 0;
    checks++; if (q != 0) begin failures++; $display("clear failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
