// tb_mem_module: writes a memory module with 16-bit words and with bytes at
// random addresses and reads it back both ways, against a byte array kept by
// the testbench (low byte of a word at the even address).
module tb_mem_module;
  logic clk = 0;
  logic [15:0] addr = 0;
  logic we_word = 0, we_byte = 0;
  logic [15:0] din = 0, dout_word;
  logic [7:0]  dout_byte;
  logic [7:0]  ref_mem [65536];
  bit          written [65536];
  int checks = 0, failures = 0;

  mem_module dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      int ad, r;
      ad = $urandom_range(0, 4095) * 2;   // small region so reads hit
      r = $urandom_range(0, 3);
      addr = 16'(ad + (r == 1 ? $urandom_range(0, 1) : 0));
      din = 16'($urandom);
      if (r == 0) begin
        we_word = 1; @(negedge clk); we_word = 0;
        ref_mem[{addr[15:1], 1'b0}] = din[7:0]; ref_mem[{addr[15:1], 1'b1}] = din[15:8];
        written[{addr[15:1], 1'b0}] = 1; written[{addr[15:1], 1'b1}] = 1;
      end else if (r == 1) begin
        we_byte = 1; @(negedge clk); we_byte = 0;
        ref_mem[addr] = din[7:0]; written[addr] = 1;
      end else begin
        #1;
        if (written[{addr[15:1], 1'b0}] && written[{addr[15:1], 1'b1}]) begin
          checks++;
          if (dout_word != {ref_mem[{addr[15:1], 1'b1}], ref_mem[{addr[15:1], 1'b0}]}) begin
            failures++; if (failures < 10) $display("word %h: got %h", addr, dout_word);
          end
        end
        addr[0] = (r == 3);
        #1;
        if (written[addr]) begin
          checks++;
          if (dout_byte != ref_mem[addr]) begin
            failures++; if (failures < 10) $display("byte %h: got %h exp %h", addr, dout_byte, ref_mem[addr]);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
