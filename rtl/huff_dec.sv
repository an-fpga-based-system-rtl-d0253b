// huff_dec: Huffman decoder. Splits the packed code stream of a frame back
// into fixed-width difference symbols, in the order Y, U, V for each pixel.
//
// Bytes enter a 24-bit, left-aligned bit buffer. Each cycle the head of the
// buffer is compared with every class of the current channel's canonical
// table (see vision_pkg): a class matches when its top `len` bits fall in
// the class's code range. The shortest matching class gives the code
// length; that many bits are removed and the index inside the class is
// turned back into the symbol. Finding the matching prefix, reading its
// length and removing that many bits follows the system description; the
// canonical-range match, bit order and byte alignment are this design's
// choices. After the last symbol of a frame (3*WIDTH*HEIGHT symbols) the
// padding bits up to the next byte boundary are dropped.
//
// Interface: byte stream in (in_valid/in_ready, in_data), symbol stream out
// (out_valid/out_ready, out_sym, out_ch; registered). One symbol per cycle
// when bits are available. err pulses when 12 or more bits match no code;
// one bit is then dropped to resynchronise.
module huff_dec
  import vision_pkg::*;
#(
  parameter int unsigned WIDTH  = 320,
  parameter int unsigned HEIGHT = 240
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [7:0]       in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [SYM_W-1:0] out_sym,
  output logic [1:0]       out_ch,
  output logic             err
);
  localparam int unsigned NPIX = WIDTH * HEIGHT;
  localparam int unsigned PW   = $clog2(NPIX + 1);
  localparam int unsigned BUF  = 24;

  logic [BUF-1:0] buf_q;
  logic [4:0]     nbits;
  logic [2:0]     used_mod8;   // bits consumed in this frame, modulo 8
  logic [PW-1:0]  npix;        // pixels completed in this frame
  chan_e          ch;          // channel of the next symbol
  logic           align;       // frame complete, drop padding

  // combinational match against the current channel's table
  logic       match, bad;
  logic [3:0] mlen;
  logic [8:0] mk;
  always_comb begin
    hclass_t    h;
    logic [11:0] head, off;
    match = 1'b0;
    mlen  = '0;
    mk    = '0;
    for (int unsigned c = 0; c < NCLASS; c++) begin
      h    = hclass(ch != CH_Y, c);
      head = 12'(buf_q >> (BUF - 32'(h.len)));
      off  = head - h.code0;
      if (!match && h.cnt != 0 && off < 12'(h.cnt)) begin
        match = 1'b1;
        mlen  = h.len;
        mk    = h.k0 + 9'(off);
      end
    end
    bad = (!match || 5'(mlen) > nbits) && nbits >= 5'd12;
  end

  logic       fire, load;
  logic [4:0] sh;
  logic [4:0] rem;
  logic [2:0] pad;             // bits to the next byte boundary
  assign pad = 3'd0 - used_mod8;
  assign fire     = !align && match && 5'(mlen) <= nbits && (!out_valid || out_ready);
  assign in_ready = nbits <= 5'd16;
  assign load     = in_valid && in_ready;
  always_comb begin
    if (align)     sh = 5'(pad);
    else if (fire) sh = 5'(mlen);
    else if (bad)  sh = 5'd1;
    else           sh = 5'd0;
    rem = nbits - sh;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q     <= '0;
      nbits     <= '0;
      used_mod8 <= '0;
      npix      <= '0;
      ch        <= CH_Y;
      align     <= 1'b0;
      out_valid <= 1'b0;
      out_sym   <= '0;
      out_ch    <= '0;
      err       <= 1'b0;
    end else begin
      buf_q <= (buf_q << sh) | (load ? (BUF'(in_data) << (BUF - 8 - 32'(rem))) : '0);
      nbits <= rem + (load ? 5'd8 : 5'd0);
      err   <= bad && !align;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (align) begin
        align     <= 1'b0;
        used_mod8 <= '0;
      end else if (fire) begin
        out_valid <= 1'b1;
        out_sym   <= unfold(ch != CH_Y, mk);
        out_ch    <= ch;
        used_mod8 <= used_mod8 + 3'(mlen);
        case (ch)
          CH_Y:    ch <= CH_U;
          CH_U:    ch <= CH_V;
          default: begin
            ch <= CH_Y;
            if (npix == PW'(NPIX - 1)) begin
              npix  <= '0;
              align <= 1'b1;
            end else begin
              npix <= npix + 1'b1;
            end
          end
        endcase
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) nbits <= 5'(BUF));

endmodule
