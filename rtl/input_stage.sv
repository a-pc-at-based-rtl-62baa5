// input_stage: host interface latch, port decoder and control register.
//
// The first part latches each host access (port number, 16-bit data, write
// or read strobe) for one clock; the second part turns the latched write
// into a strobe for the memory or map that the port addresses, so the rest
// of the board sees stable data for a full clock. Image words and packed
// codes are 16 bits wide; bit map and class map writes use the low 8 bits.
// Writes to P_CTRL load the control register (ctrl_t), which holds the
// status fields and flag bits of the board until the next write; it is
// cleared by reset (forward transform, normal operation, one class).
// Latency: a strobe leaves one clock after the host access.
// Which memories the input stage feeds follows the board description; the
// port numbering and the go/clear commands are this design's choices.
module input_stage
  import ias_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        h_wr,
  input  logic        h_rd,
  input  logic [2:0]  h_port,
  input  logic [15:0] h_wdata,
  output ctrl_t       ctrl,
  output logic [15:0] data,       // latched host data
  output logic        img_we,     // image / packed code word
  output logic        qt_we,      // quantization table word
  output logic        amap_ld,
  output logic        bmap_ld,
  output logic        cmap_ld,
  output logic        go,
  output logic        clr,
  output logic        rd_stat,
  output logic        rd_out0,    // read output memory 1
  output logic        rd_out1     // read output memory 2
);

  logic       wr_q, rd_q;
  port_e      port_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_q   <= 1'b0;
      rd_q   <= 1'b0;
      port_q <= P_CTRL;
      data   <= '0;
    end else begin
      wr_q   <= h_wr;
      rd_q   <= h_rd && !h_wr;
      port_q <= port_e'(h_port);
      if (h_wr) data <= h_wdata;
    end
  end

  assign img_we  = wr_q && port_q == P_IMAGE;
  assign qt_we   = wr_q && port_q == P_QTAB;
  assign amap_ld = wr_q && port_q == P_AMAP;
  assign bmap_ld = wr_q && port_q == P_BMAP;
  assign cmap_ld = wr_q && port_q == P_CMAP;
  assign go      = wr_q && port_q == P_GO;
  assign clr     = wr_q && port_q == P_CLEAR;
  assign rd_stat = rd_q && port_q == P_CTRL;
  assign rd_out0 = rd_q && port_q == P_IMAGE;
  assign rd_out1 = rd_q && port_q == P_QTAB;

  // control register
  always_ff @(posedge clk) begin
    if (rst)                          ctrl <= '0;
    else if (wr_q && port_q == P_CTRL) ctrl <= ctrl_t'(data[$bits(ctrl_t)-1:0]);
  end

endmodule
