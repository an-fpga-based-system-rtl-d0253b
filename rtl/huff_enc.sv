// huff_enc: Huffman encoder. Turns the fixed-width difference symbols of a
// frame into a packed stream of variable-length code words.
//
// Each symbol is looked up in the fixed code table of its channel (brightness
// table for Y, colour table for U and V; see vision_pkg). The code word is
// appended, MSB first, to a bit accumulator, and whole bytes leave from its
// top. After the 3*WIDTH*HEIGHT-th symbol of a frame the last partial byte is
// padded with zeros and sent, so every frame starts on a byte boundary. The
// lookup-table encoder follows the system description; the byte packing,
// bit order and frame padding are this design's choices.
//
// Interface: symbol stream in (in_valid/in_ready, in_sym, in_ch), byte
// stream out (out_valid/out_ready, out_data). A symbol is accepted only
// while fewer than 8 bits wait in the accumulator, so a symbol is taken at
// most every cycle for short codes and every two cycles for the longest.
// out_data is driven from registers.
module huff_enc
  import vision_pkg::*;
#(
  parameter int unsigned WIDTH  = 320,
  parameter int unsigned HEIGHT = 240
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [SYM_W-1:0] in_sym,
  input  logic [1:0]       in_ch,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [7:0]       out_data,
  output logic             frame_done   // pulses when a frame's last byte leaves
);
  localparam int unsigned NSYM = 3 * WIDTH * HEIGHT;
  localparam int unsigned CW   = $clog2(NSYM + 1);
  localparam int unsigned ACC  = 20;  // 7 waiting bits + longest code + 1

  logic [ACC-1:0] acc;      // left-aligned pending bits
  logic [4:0]     nbits;    // number of valid bits in acc
  logic [CW-1:0]  nsym;     // symbols accepted in this frame
  logic           flush;    // frame's symbols all accepted, pad and send rest

  hcode_t hc;
  logic   take, give;

  always_comb hc = huff_lookup(in_ch != CH_Y, in_sym);

  assign in_ready  = (nbits < 5'd8) && !flush;
  assign out_valid = (nbits >= 5'd8) || (flush && nbits != 0);
  assign out_data  = acc[ACC-1 -: 8];
  assign take      = in_valid && in_ready;
  assign give      = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      nbits      <= '0;
      nsym       <= '0;
      flush      <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (take) begin
        // place the right-aligned code just below the pending bits
        acc   <= acc | ((ACC'(hc.code) << (ACC - 32'(hc.len))) >> nbits);
        nbits <= nbits + 5'(hc.len);
        if (nsym == CW'(NSYM - 1)) begin
          nsym  <= '0;
          flush <= 1'b1;
        end else begin
          nsym <= nsym + 1'b1;
        end
      end else if (give) begin
        acc <= acc << 8;
        if (nbits > 5'd8) begin
          nbits <= nbits - 5'd8;
        end else begin
          nbits <= '0;
          if (flush) begin
            flush      <= 1'b0;
            frame_done <= 1'b1;
          end
        end
      end else if (flush && nbits == 0) begin
        flush      <= 1'b0;    // frame ended exactly on a byte boundary
        frame_done <= 1'b1;
      end
    end
  end

  // take and give never coincide: take needs nbits < 8, give then needs flush,
  // and flush blocks take.
  assert property (@(posedge clk) disable iff (!rst_n) !(take && give));
  assert property (@(posedge clk) disable iff (!rst_n) nbits <= 5'(ACC));

endmodule
