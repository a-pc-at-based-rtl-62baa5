// ias_pkg: types shared by the image archiving board.
//
// Host port numbers, the control register layout and the address orders of
// address generator 1. The control register holds the status fields
// (forward/inverse, album, CY3/CY2 degree, subsampling/filtering) and the
// flag bits (colour plane G1/G2, frame buffer/computer, 1 or 4 classes) of
// the board; the image-size bit is an addition of this design.
package ias_pkg;

  // host I/O ports (write)
  typedef enum logic [2:0] {
    P_CTRL  = 3'd0,  // control register
    P_IMAGE = 3'd1,  // input memory: image (forward) or packed codes (inverse)
    P_QTAB  = 3'd2,  // quantization table into input memory 2
    P_AMAP  = 3'd3,  // address map, two words per entry (low 16, high 3 bits)
    P_BMAP  = 3'd4,  // bit map, two 4-bit entries per write (low nibble first)
    P_CMAP  = 3'd5,  // class map, four 2-bit entries per write (low pair first)
    P_GO    = 3'd6,  // start a run: [11:0] blocks-1, [15] keep block index
    P_CLEAR = 3'd7   // clear AG3 and the map loading pointers
  } port_e;
  // host reads: P_CTRL returns status, P_IMAGE reads output memory 1 and
  // P_QTAB reads output memory 2, one 16-bit word per read at AG3.

  typedef struct packed {
    logic       size512;  // 1: 512-wide image, 0: 256-wide
    logic       class4;   // 1: four coefficient classes, 0: one class
    logic       to_fb;    // 1: result goes to the frame buffer
    logic [1:0] plane;    // G2,G1 colour plane
    logic       subsamp;  // 1: subsampling, 0: low-pass filtering
    logic [1:0] degree;   // CY3,CY2: 00 normal, 01 2x2, 10 4x4, 11 6x6
    logic       album;    // album display: AG1 keeps counting across runs
    logic       inverse;  // 1: inverse transform, 0: forward transform
  } ctrl_t;

  // address orders of AG1
  typedef enum logic [2:0] {
    AG_BLK256  = 3'd0,  // 8x8 block order in a 256-wide image
    AG_BLK512  = 3'd1,  // 8x8 block order in a 512-wide image
    AG_CPU2_256 = 3'd2, // 2x2 subsampled output, 256 image, to computer
    AG_CPU4_256 = 3'd3, // 4x4 subsampled output, 256 image, to computer
    AG_CPU2_512 = 3'd4,
    AG_CPU4_512 = 3'd5,
    AG_FB2     = 3'd6,  // 2x2 subsampled images tiled on the frame buffer
    AG_FB4     = 3'd7   // 4x4 subsampled images tiled on the frame buffer
  } ag1_mode_e;

endpackage
