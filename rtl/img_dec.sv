// img_dec: image decoder, the inverse of img_enc. Takes the Y, U, V
// difference symbols of each pixel, adds back the prediction
// (left + up) / 2 of every channel, and converts the restored Y, U, V to
// RGB.
//
// The prediction rule, border rule and colour transform are exactly those of
// img_enc; the inverse transform is G = Y - (U + V) / 4, R = V + G, B = U + G
// with U and V scaled back by 8 and each component clamped to 0..255. Undoing
// the prediction and recombining the colour channels follows the system
// description; the transform itself is this design's choice. Each channel is
// restored as soon as its symbol arrives; a one-row line memory holds the
// restored {Y, U, V} of the previous row.
//
// Interface: symbol stream in (in_valid/in_ready, in_sym, in_ch; channels in
// the order Y, U, V), pixel stream out (out_valid/out_ready, out_rgb,
// registered). One symbol per cycle; the pixel appears the cycle after its V
// symbol. in_ch is only checked by an assertion: the block counts channels
// itself.
module img_dec
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
  output rgb_t             out_rgb
);
  localparam int unsigned XW = $clog2(WIDTH);
  localparam int unsigned YW = $clog2(HEIGHT);

  typedef struct packed {
    logic [7:0] y;
    logic [5:0] u;
    logic [5:0] v;
  } yuv_t;

  yuv_t          line_mem [WIDTH];
  yuv_t          left_q;
  yuv_t          part_q;            // Y and U restored so far for this pixel
  logic [XW-1:0] col;
  logic [YW-1:0] row;
  logic [1:0]    phase;

  yuv_t up, cur;
  logic take;

  always_comb begin
    up  = line_mem[col];
    cur = part_q;
    case (phase)
      2'd0:    cur.y = in_sym + predict(1'b0, col != 0, row != 0, left_q.y, up.y);
      2'd1:    cur.u = 6'(in_sym) + 6'(predict(1'b1, col != 0, row != 0, {2'b00, left_q.u}, {2'b00, up.u}));
      default: cur.v = 6'(in_sym) + 6'(predict(1'b1, col != 0, row != 0, {2'b00, left_q.v}, {2'b00, up.v}));
    endcase
  end

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (take && phase == 2'd2) line_mem[col] <= cur;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left_q    <= '0;
      part_q    <= '0;
      col       <= '0;
      row       <= '0;
      phase     <= '0;
      out_valid <= 1'b0;
      out_rgb   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        part_q <= cur;
        if (phase == 2'd2) begin
          phase     <= '0;
          left_q    <= cur;
          out_valid <= 1'b1;
          out_rgb   <= yuv_to_rgb(cur.y, cur.u, cur.v);
          if (col == XW'(WIDTH - 1)) begin
            col <= '0;
            row <= (row == YW'(HEIGHT - 1)) ? '0 : row + 1'b1;
          end else begin
            col <= col + 1'b1;
          end
        end else begin
          phase <= phase + 2'd1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_ch == phase);

endmodule
