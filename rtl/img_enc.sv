// img_enc: image encoder. Converts each RGB pixel to a brightness channel Y
// and two colour channels U, V, then replaces every channel value p by its
// difference from the mean of its left and upper neighbours,
// d = p - (left + up) / 2, and emits the three differences as symbols.
//
// The colour transform is Y = (R + 2G + B) / 4 (8 bits), U = B - G and
// V = R - G, the last two rounded to 6 bits: brightness is kept more
// precisely than colour, as the system description asks, but the exact
// transform and widths are this design's choice. The prediction equation is
// the description's; at the image border the one existing neighbour is used
// and the very first pixel is predicted as mid-grey (Y) or zero (U, V), a
// choice of this design. Differences wrap modulo 2^bits so each symbol keeps
// the width of its channel. A one-row line memory of {Y, U, V} supplies the
// upper neighbour.
//
// Interface: pixel stream in (in_valid/in_ready, in_rgb), symbol stream out
// (out_valid/out_ready, out_sym, out_ch) carrying Y, U, V of each pixel in
// that order. A pixel is taken when the previous pixel's last symbol leaves,
// so the block sustains one pixel per three cycles.
module img_enc
  import vision_pkg::*;
#(
  parameter int unsigned WIDTH  = 320,
  parameter int unsigned HEIGHT = 240
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  rgb_t             in_rgb,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [SYM_W-1:0] out_sym,
  output logic [1:0]       out_ch
);
  localparam int unsigned XW = $clog2(WIDTH);
  localparam int unsigned YW = $clog2(HEIGHT);

  typedef struct packed {
    logic [7:0] y;
    logic [5:0] u;
    logic [5:0] v;
  } yuv_t;

  yuv_t          line_mem [WIDTH];   // previous row
  yuv_t          left_q;
  logic [XW-1:0] col;
  logic [YW-1:0] row;
  logic [SYM_W-1:0] d_q [3];
  logic [1:0]    phase;              // symbol being sent

  yuv_t cur, up;
  logic [SYM_W-1:0] dy, du, dv;
  logic take, last_out;

  always_comb begin
    cur.y = rgb_to_y(in_rgb);
    cur.u = rgb_to_c(in_rgb.b, in_rgb.g);
    cur.v = rgb_to_c(in_rgb.r, in_rgb.g);
    up    = line_mem[col];
    dy = cur.y - predict(1'b0, col != 0, row != 0, left_q.y, up.y);
    du = SYM_W'(6'(cur.u - 6'(predict(1'b1, col != 0, row != 0, {2'b00, left_q.u}, {2'b00, up.u}))));
    dv = SYM_W'(6'(cur.v - 6'(predict(1'b1, col != 0, row != 0, {2'b00, left_q.v}, {2'b00, up.v}))));
  end

  assign last_out = out_valid && out_ready && phase == 2'd2;
  assign in_ready = !out_valid || last_out;
  assign take     = in_valid && in_ready;
  assign out_sym  = d_q[phase];
  assign out_ch   = phase;

  always_ff @(posedge clk) begin
    if (take) line_mem[col] <= cur;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left_q    <= '0;
      col       <= '0;
      row       <= '0;
      phase     <= '0;
      out_valid <= 1'b0;
      d_q       <= '{default: '0};
    end else begin
      if (out_valid && out_ready) phase <= (phase == 2'd2) ? 2'd0 : phase + 2'd1;
      if (last_out) out_valid <= 1'b0;
      if (take) begin
        out_valid <= 1'b1;
        d_q       <= '{dy, du, dv};
        left_q    <= cur;
        if (col == XW'(WIDTH - 1)) begin
          col <= '0;
          row <= (row == YW'(HEIGHT - 1)) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) phase != 2'd3);

endmodule
