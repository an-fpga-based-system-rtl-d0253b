// vision_pkg: types, constants and the fixed Huffman code tables shared by the
// codec blocks of the PC-FPGA vision system.
//
// The PC and the FPGA exchange each frame as three channels (brightness Y and
// two colour differences U, V) in which every value has been replaced by its
// difference from the mean of its left and upper neighbours. Those
// differences are then coded with one fixed prefix code for the brightness
// channel and another for the colour channels. The idea of two fixed tables
// comes from the system's description. The tables themselves are this
// design's choice. Each is a canonical code. A difference d, read as a
// signed number of the channel's width, is first folded to the index
// k = 2d (d >= 0) or -2d-1 (d < 0). Runs of consecutive k then share one
// code length (a "class"). Codes within a class count up from the class's
// first code. The lengths follow a two-sided geometric spread of
// differences: short codes for small differences.
//
//   Y table (256 symbols): lengths 2,3,4,6,8,12 for 1,2,4,8,16,224 indices
//   U/V table (64 symbols): lengths 1,3,5,9 for 1,2,4,57 indices
//
// Both tables satisfy the Kraft inequality, so they are prefix-free. The
// decoder matches the head of the bit stream against each class's code
// range, shortest first.
package vision_pkg;

  // Y has 8 bits, U and V 6 bits; symbols travel on an 8-bit bus and the
  // longest code word has 12 bits.
  localparam int unsigned SYM_W  = 8;   // symbol bus width (widest channel)
  localparam int unsigned NCLASS = 6;   // classes per table (chroma pads unused ones)

  typedef enum logic [1:0] {CH_Y = 2'd0, CH_U = 2'd1, CH_V = 2'd2} chan_e;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // One class of a canonical code: code length, first index k, number of
  // indices and first code word.
  typedef struct packed {
    logic [3:0]  len;
    logic [8:0]  k0;
    logic [8:0]  cnt;
    logic [11:0] code0;
  } hclass_t;

  typedef struct packed {
    logic [3:0]  len;
    logic [11:0] code;  // right-aligned code word
  } hcode_t;

  // Class tables. A class with cnt = 0 is unused.
  function automatic hclass_t hclass(input logic chroma, input int unsigned c);
    hclass_t h;
    h = '0;
    if (!chroma) begin
      case (c)
        0: h = '{len: 4'd2,  k0: 9'd0,  cnt: 9'd1,   code0: 12'd0};
        1: h = '{len: 4'd3,  k0: 9'd1,  cnt: 9'd2,   code0: 12'd2};
        2: h = '{len: 4'd4,  k0: 9'd3,  cnt: 9'd4,   code0: 12'd8};
        3: h = '{len: 4'd6,  k0: 9'd7,  cnt: 9'd8,   code0: 12'd48};
        4: h = '{len: 4'd8,  k0: 9'd15, cnt: 9'd16,  code0: 12'd224};
        5: h = '{len: 4'd12, k0: 9'd31, cnt: 9'd225, code0: 12'd3840};
        default: h = '0;
      endcase
    end else begin
      case (c)
        0: h = '{len: 4'd1,  k0: 9'd0,  cnt: 9'd1,   code0: 12'd0};
        1: h = '{len: 4'd3,  k0: 9'd1,  cnt: 9'd2,   code0: 12'd4};
        2: h = '{len: 4'd5,  k0: 9'd3,  cnt: 9'd4,   code0: 12'd24};
        3: h = '{len: 4'd9,  k0: 9'd7,  cnt: 9'd57,  code0: 12'd448};
        default: h = '0;
      endcase
    end
    return h;
  endfunction

  // Fold a channel symbol (a difference modulo 2^bits) to the index k.
  function automatic logic [8:0] fold(input logic chroma, input logic [SYM_W-1:0] sym);
    logic [8:0] k;
    if (!chroma) k = sym[7] ? 9'({~sym[6:0], 1'b1}) : 9'({sym[6:0], 1'b0});
    else         k = sym[5] ? 9'({~sym[4:0], 1'b1}) : 9'({sym[4:0], 1'b0});
    return k;
  endfunction

  // Inverse of fold: index k back to the channel symbol.
  function automatic logic [SYM_W-1:0] unfold(input logic chroma, input logic [8:0] k);
    logic [7:0] m;
    m = k[8:1];
    if (!chroma) return k[0] ? ~m : m;
    else         return k[0] ? {2'b00, ~m[5:0]} : {2'b00, m[5:0]};
  endfunction

  // Encoder table lookup: symbol to code word and length.
  function automatic hcode_t huff_lookup(input logic chroma, input logic [SYM_W-1:0] sym);
    hcode_t  r;
    hclass_t h;
    logic [8:0] k;
    k = fold(chroma, sym);
    r = '0;
    for (int unsigned c = 0; c < NCLASS; c++) begin
      h = hclass(chroma, c);
      if (h.cnt != 0 && k >= h.k0 && k < h.k0 + h.cnt) begin
        r.len  = h.len;
        r.code = h.code0 + 12'(k - h.k0);
      end
    end
    return r;
  endfunction

  // Colour transform. Y = (R + 2G + B) / 4 keeps 8 bits. The colour
  // differences U = B - G and V = R - G (9-bit signed) are rounded to
  // CHROMA_BITS by dropping CHROMA_SHIFT bits and saturating.
  localparam int unsigned CHROMA_SHIFT = 3;

  function automatic logic [7:0] rgb_to_y(input rgb_t p);
    return 8'((10'(p.r) + 10'({p.g, 1'b0}) + 10'(p.b)) >> 2);
  endfunction

  function automatic logic [5:0] rgb_to_c(input logic [7:0] a, input logic [7:0] g);
    logic signed [10:0] d;
    d = ($signed({3'b000, a}) - $signed({3'b000, g}) + 11'sd4) >>> CHROMA_SHIFT;
    if (d > 11'sd31) d = 11'sd31;
    return 6'(d);
  endfunction

  // Inverse transform with the colour differences restored as q << 3 and
  // each component clamped to 0..255.
  function automatic rgb_t yuv_to_rgb(input logic [7:0] y, input logic [5:0] uq,
                                      input logic [5:0] vq);
    logic signed [11:0] u, v, g, r, b;
    rgb_t o;
    u = 12'($signed(uq)) <<< CHROMA_SHIFT;
    v = 12'($signed(vq)) <<< CHROMA_SHIFT;
    g = $signed({4'b0000, y}) - ((u + v) >>> 2);
    r = v + g;
    b = u + g;
    o.r = (r < 0) ? 8'd0 : (r > 255) ? 8'd255 : 8'(r);
    o.g = (g < 0) ? 8'd0 : (g > 255) ? 8'd255 : 8'(g);
    o.b = (b < 0) ? 8'd0 : (b > 255) ? 8'd255 : 8'(b);
    return o;
  endfunction

  // Prediction of Eq. "d = p - (left + up) / 2". At the image border the one
  // existing neighbour is used; the first pixel is predicted as mid-grey (Y)
  // or zero (U, V). Values are channel-width codes; U, V are two's complement.
  function automatic logic [7:0] predict(input logic chroma, input logic has_left,
                                         input logic has_up, input logic [7:0] left,
                                         input logic [7:0] up);
    logic [8:0] sum;
    logic [7:0] s;
    if (!chroma) sum = 9'(left) + 9'(up);
    else         sum = {{3{left[5]}}, left[5:0]} + {{3{up[5]}}, up[5:0]};
    if (has_left && has_up) s = sum[8:1];   // (left + up) / 2, floor
    else if (has_left)      s = left;
    else if (has_up)        s = up;
    else                    s = chroma ? 8'd0 : 8'd128;
    return chroma ? {2'b00, s[5:0]} : s[7:0];
  endfunction

endpackage
