// inverse_addr_gen: inverse transform address generator with its address
// map, bit map and class map, and the unpacking of variable-length codes.
//
// In inverse transform the coefficient codes are packed bit-serially, one
// stream per coefficient type (frequency), the streams holding the codes of
// all blocks in block order. For coefficient type `idx` of block `blk`:
//  1. class   = class map[blk] (0 when `class4` is off),
//     length  L = bit map[{class, idx}] (0..8 bits),
//     pointer P = address map[idx] (19-bit bit address of the next code);
//  2. the packed data memory is read at P[18:3] (byte holding the MSBs) and
//     at (P+L)[18:3] (byte holding the LSBs), and P+L is written back to the
//     address map - the ALU adds bit map to address map, and only its 16
//     MSBs address the memory;
//  3. the code (MSB first in the stream) is its sign bit followed by an
//     L-1 bit level index; the quantization table in input memory 2 is read
//     at {class, idx, index} and its 16-bit magnitude, less its 2 LSBs, goes
//     to the ICT chips in sign-magnitude form with the code's sign. L = 0
//     gives a zero coefficient and reads nothing.
// A lookup takes five clocks from `req` to `done` (IDLE, MAP, B0, B1, QT).
//
// Loading (host, 8-bit and 16-bit writes): address map two writes per entry
// (low 16 bits, then high 3 bits), bit map two 4-bit entries per write,
// class map four 2-bit entries per write, each from entry 0 upwards after
// `ld_clr`. The quantization table is loaded after the bit map: `qt_ld_addr`
// gives the address of each table word the host writes, stepping through
// the 2^(L-1) levels of every class and type in turn and skipping types of
// length 0, so only levels in use are loaded. Map sizes (64 x 19, 256 x 4,
// 4096 x 2 for a 512x512 image), the two-access unpacking, the table
// addressing and the bit-map-controlled table loading follow the board
// description; the code format (sign then index, MSB first) and the loading
// formats are this design's choices.
module inverse_addr_gen
  import ict_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // map loading
  input  logic        ld_clr,
  input  logic        ld_amap,
  input  logic        ld_bmap,
  input  logic        ld_cmap,
  input  logic [15:0] ld_data,
  // lookup
  input  logic        class4,
  input  logic        req,
  input  logic [5:0]  idx,
  input  logic [11:0] blk,
  output logic [15:0] pk_addr,   // packed data memory byte address
  input  logic [7:0]  pk_byte,
  output logic [14:0] qt_addr,   // quantization table word address
  input  logic [15:0] qt_word,
  input  logic        qt_ld,     // host writes one quantization table word
  output logic [14:0] qt_ld_addr, // its table word address
  output word_t       coef,      // sign + 13-bit magnitude
  output logic        done
);

  // ---------------- maps ----------------
  logic [18:0] amap [64];
  logic [3:0]  bmap [256];
  logic [255:0] nz;       // bit map entry is non-zero, kept beside the map
  logic [1:0]  cmap [4096];

  logic [6:0]  a_ptr;     // entry*2 + half
  logic [7:0]  b_ptr;
  logic [11:0] c_ptr;

  typedef enum logic [2:0] {S_IDLE, S_MAP, S_B0, S_B1, S_QT} state_e;
  state_e      st;

  logic [5:0]  r_idx;
  logic [11:0] r_blk;
  logic [1:0]  r_cls;
  logic [3:0]  r_len;
  logic [18:0] r_ptr;
  logic [7:0]  r_b0;
  logic [18:0] nxt_ptr;

  assign nxt_ptr = r_ptr + 19'(r_len);

  always_ff @(posedge clk) begin
    if (rst || ld_clr) begin
      a_ptr <= '0;
      b_ptr <= '0;
      c_ptr <= '0;
    end else begin
      if (ld_amap) a_ptr <= a_ptr + 7'd1;
      if (ld_bmap) b_ptr <= b_ptr + 8'd2;
      if (ld_cmap) c_ptr <= c_ptr + 12'd4;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst && !ld_clr) begin
      if (ld_amap) begin
        if (!a_ptr[0]) amap[a_ptr[6:1]][15:0]  <= ld_data;
        else           amap[a_ptr[6:1]][18:16] <= ld_data[2:0];
      end else if (st == S_B1) begin
        amap[r_idx] <= nxt_ptr;
      end
      if (ld_bmap) begin
        bmap[b_ptr]        <= ld_data[3:0];
        bmap[b_ptr + 8'd1] <= ld_data[7:4];
        nz[b_ptr]          <= ld_data[3:0] != 4'd0;
        nz[b_ptr + 8'd1]   <= ld_data[7:4] != 4'd0;
      end
      if (ld_cmap) begin
        cmap[c_ptr]         <= ld_data[1:0];
        cmap[c_ptr + 12'd1] <= ld_data[3:2];
        cmap[c_ptr + 12'd2] <= ld_data[5:4];
        cmap[c_ptr + 12'd3] <= ld_data[7:6];
      end
    end
  end

  // ---------------- quantization table loading ----------------
  // The table holds 2^(L-1) levels for each class and type with code length
  // L > 0 (a level is addressed by the L-1 index bits of a code). After
  // `ld_clr` the host writes just those levels, class by class and type by
  // type, and the load address {class, type, level} is stepped under control
  // of the bit map, skipping types of length 0: the bit map must therefore
  // be loaded before the table.
  logic [7:0] ql_ty, ql_eff, ql_next;
  logic [6:0] ql_lvl;
  logic [3:0] ql_len;
  logic [7:0] ql_nlev;

  always_comb begin
    ql_eff = ql_ty;
    for (int t = 255; t >= 0; t--)
      if (8'(t) >= ql_ty && nz[t]) ql_eff = 8'(t);
    ql_next = ql_eff;
    for (int t = 255; t >= 0; t--)
      if (8'(t) > ql_eff && nz[t]) ql_next = 8'(t);
    ql_len  = (bmap[ql_eff] > 4'd8) ? 4'd8 : bmap[ql_eff];
    ql_nlev = (ql_len == 4'd0) ? 8'd1 : 8'd1 << (ql_len - 4'd1);
  end

  always_ff @(posedge clk) begin
    if (rst || ld_clr) begin
      ql_ty  <= '0;
      ql_lvl <= '0;
    end else if (qt_ld) begin
      if (8'(ql_lvl) + 8'd1 >= ql_nlev) begin
        ql_ty  <= ql_next;
        ql_lvl <= '0;
      end else begin
        ql_ty  <= ql_eff;
        ql_lvl <= ql_lvl + 7'd1;
      end
    end
  end

  assign qt_ld_addr = {ql_eff, ql_lvl};

  // ---------------- lookup sequence ----------------
  // window of two bytes holding the code, and the code itself
  logic [15:0] win;
  logic [15:0] shifted;
  logic [7:0]  code;
  logic [6:0]  lvl;
  logic        sgn;
  logic [4:0]  sh;

  logic [1:0]  cls;
  assign cls = class4 ? cmap[r_blk] : 2'd0;

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= S_IDLE;
      done  <= 1'b0;
      coef  <= '0;
      r_idx <= '0;
      r_blk <= '0;
      r_cls <= '0;
      r_len <= '0;
      r_ptr <= '0;
      r_b0  <= '0;
      win   <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (req) begin
          r_idx <= idx;
          r_blk <= blk;
          st    <= S_MAP;
        end
        S_MAP: begin
          r_cls <= cls;
          r_len <= (bmap[{cls, r_idx}] > 4'd8) ? 4'd8 : bmap[{cls, r_idx}];
          r_ptr <= amap[r_idx];
          st    <= S_B0;
        end
        S_B0: begin
          r_b0 <= pk_byte;
          st   <= S_B1;
        end
        S_B1: begin
          st   <= S_QT;
          win  <= (nxt_ptr[18:3] == r_ptr[18:3]) ? {r_b0, 8'h00} : {r_b0, pk_byte};
        end
        default: begin
          done <= 1'b1;
          st   <= S_IDLE;
          if (r_len == 4'd0) coef <= '0;
          else               coef <= {sgn, qt_word[14:2]};
        end
      endcase
    end
  end


  assign sh      = 5'd16 - 5'(r_ptr[2:0]) - 5'(r_len);
  assign shifted = win >> sh;
  assign code    = shifted[7:0] & 8'((9'd1 << r_len) - 9'd1);
  assign sgn     = (r_len == 4'd0) ? 1'b0 : code[3'(r_len - 4'd1)];
  assign lvl     = (r_len <= 4'd1) ? 7'd0 : 7'(code & 8'((9'd1 << (r_len - 4'd1)) - 9'd1));

  always_comb begin
    unique case (st)
      S_B0:    pk_addr = r_ptr[18:3];
      S_B1:    pk_addr = nxt_ptr[18:3];
      default: pk_addr = r_ptr[18:3];
    endcase
  end

  assign qt_addr = {r_cls, r_idx, lvl};

endmodule
