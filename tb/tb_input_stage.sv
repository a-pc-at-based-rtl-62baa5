// tb_input_stage: writes and reads every host port and checks that exactly
// the right strobe appears one clock later with the latched data, that the
// control register takes and holds its fields, and that reads produce the
// read strobes.
module tb_input_stage;
  import ias_pkg::*;
  logic clk = 0, rst = 1, h_wr = 0, h_rd = 0;
  logic [2:0] h_port = 0;
  logic [15:0] h_wdata = 0;
  ctrl_t ctrl;
  logic [15:0] data;
  logic img_we, qt_we, amap_ld, bmap_ld, cmap_ld, go, clr, rd_stat, rd_out0, rd_out1;
  int checks = 0, failures = 0;

  input_stage dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] strobes, expw;
    logic [15:0] v;
    ctrl_t held;
    bit was_wr;
    repeat (2) @(negedge clk); rst = 0;
    held = '0;
    for (int n = 0; n < 2000; n++) begin
      v = 16'($urandom);
      h_port = 3'($urandom_range(0, 7));
      h_wdata = v;
      was_wr = ($urandom_range(0, 3) != 0);
      h_wr = was_wr; h_rd = !was_wr;
      @(negedge clk);
      h_wr = 0; h_rd = 0;
      strobes = {rd_out1, rd_out0, rd_stat, clr, go, cmap_ld, bmap_ld, amap_ld, qt_we, img_we};
      expw = '0;
      if (was_wr) begin
        case (h_port)
          P_IMAGE: expw[0] = 1;
          P_QTAB:  expw[1] = 1;
          P_AMAP:  expw[2] = 1;
          P_BMAP:  expw[3] = 1;
          P_CMAP:  expw[4] = 1;
          P_GO:    expw[5] = 1;
          P_CLEAR: expw[6] = 1;
          default: ;
        endcase
        if (h_port == P_CTRL) held = ctrl_t'(v[$bits(ctrl_t)-1:0]);
        checks++;
        if (data != v) begin failures++; $display("latched data %h exp %h", data, v); end
      end else begin
        case (h_port)
          P_CTRL:  expw[7] = 1;
          P_IMAGE: expw[8] = 1;
          P_QTAB:  expw[9] = 1;
          default: ;
        endcase
      end
      checks++;
      if (strobes != expw) begin
        failures++;
        if (failures < 10) $display("port %0d: strobes %b exp %b", h_port, strobes, expw);
      end
      @(negedge clk);
      checks++;
      if (ctrl != held) begin failures++; $display("control register %h exp %h", ctrl, held); end
      checks++;
      if ({rd_out1, rd_out0, rd_stat, clr, go, cmap_ld, bmap_ld, amap_ld, qt_we, img_we} != 0) begin
        failures++; $display("strobe longer than one clock");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
