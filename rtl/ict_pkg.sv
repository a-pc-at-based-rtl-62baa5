// ict_pkg: types and constants shared by the ICT chip set and the image
// archiving board.
//
// The transform is the order-8 integer cosine transform ICT(10,9,6,2,3,1) in
// its modified form with scaling factors R = 8 (rows 0 and 4) and M = 3 (rows
// 2 and 6). Every kernel element then has one of six magnitudes
// {2,3,6,8,9,10}; the chip's decoder compresses the magnitude to a 3-bit code
// (kmag_e) plus a sign, and the multiplier works from that code.
// Data words on the chip pins are 14 bits (sign plus 13 magnitude bits, or
// 14-bit two's complement depending on MODE2); the accumulator is 20 bits.
package ict_pkg;

  localparam int unsigned WORD_W = 14;   // chip input/output word
  localparam int unsigned MAG_W  = 13;   // multiplicand magnitude bits
  localparam int unsigned PROD_W = 17;   // product bits P0..P16
  localparam int unsigned ACC_W  = 20;   // accumulator width
  localparam int unsigned TRUNC  = ACC_W - WORD_W; // 6 LSBs dropped

  typedef logic [WORD_W-1:0] word_t;

  // 3-bit magnitude code produced by the second decoder operation
  typedef enum logic [2:0] {
    K2  = 3'd0,
    K3  = 3'd1,
    K6  = 3'd2,
    K8  = 3'd3,
    K9  = 3'd4,
    K10 = 3'd5
  } kmag_e;

  typedef struct packed {
    logic  neg;   // element is negative
    kmag_e mag;   // element magnitude
  } kelem_t;

  // Modified kernel [J^] with R = 8 and M = 3: element (row, col)
  function automatic int signed kernel(input logic [2:0] row, input logic [2:0] col);
    int signed k;
    unique case (row)
      3'd0: k = 8;
      3'd1: begin
        case (col) 0: k = 10; 1: k = 9; 2: k = 6; 3: k = 2;
                   4: k = -2; 5: k = -6; 6: k = -9; default: k = -10; endcase
      end
      3'd2: begin
        case (col) 0,7: k = 9; 1,6: k = 3; 2,5: k = -3; default: k = -9; endcase
      end
      3'd3: begin
        case (col) 0: k = 9; 1: k = -2; 2: k = -10; 3: k = -6;
                   4: k = 6; 5: k = 10; 6: k = 2; default: k = -9; endcase
      end
      3'd4: begin
        case (col) 0,3,4,7: k = 8; default: k = -8; endcase
      end
      3'd5: begin
        case (col) 0: k = 6; 1: k = -10; 2: k = 2; 3: k = 9;
                   4: k = -9; 5: k = -2; 6: k = 10; default: k = -6; endcase
      end
      3'd6: begin
        case (col) 0,7: k = 3; 1,6: k = -9; 2,5: k = 9; default: k = -3; endcase
      end
      default: begin
        case (col) 0: k = 2; 1: k = -6; 2: k = 9; 3: k = -10;
                   4: k = 10; 5: k = -9; 6: k = 6; default: k = -2; endcase
      end
    endcase
    return k;
  endfunction

  // Decoder: kernel element -> sign and 3-bit magnitude code
  function automatic kelem_t encode_elem(input int signed k);
    kelem_t e;
    int signed a;
    e.neg = (k < 0);
    a = (k < 0) ? -k : k;
    case (a)
      2:       e.mag = K2;
      3:       e.mag = K3;
      6:       e.mag = K6;
      8:       e.mag = K8;
      9:       e.mag = K9;
      default: e.mag = K10;
    endcase
    return e;
  endfunction

  // Group size selected by CY3..CY1 (or CT2,CT1,0 on the Data Sequencer):
  // the binary value, with 0 meaning a full group of eight.
  function automatic logic [3:0] group_size(input logic [2:0] cy);
    return (cy == 3'd0) ? 4'd8 : {1'b0, cy};
  endfunction

endpackage
