// image_proc: the image processing module, the part of the system meant to
// be replaced by whatever algorithm is being developed. This version holds
// the three algorithms the system was built with: Sobel edge detection,
// SUSAN edge detection and SUSAN corner detection.
//
// Each RGB pixel is reduced to gray = (R + 2G + B) / 4 and given to the
// selected detector; the detector's 8-bit result is returned as a gray RGB
// pixel (R = G = B). mode (0 Sobel, 1 SUSAN edge, 2 SUSAN corner, 3 as 0)
// is sampled at the first pixel of each frame and pushed into a small mode
// FIFO; the output side reads its results from the detector named at the
// head of that FIFO and pops it after the frame's last result. A mode
// change thus never splits a frame, even while earlier frames still drain
// from another detector. Up to MODE_FIFO frames may be in flight; a new
// frame waits while the FIFO is full. The gray conversion, result format
// and frame-wise switching are this design's choices.
//
// Interface: in_valid/in_ready/in_rgb, out_valid/out_ready/out_rgb; one
// pixel per cycle, latency that of the selected detector.
module image_proc
  import vision_pkg::*;
#(
  parameter int unsigned WIDTH  = 320,
  parameter int unsigned HEIGHT = 240
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] mode,
  input  logic       in_valid,
  output logic       in_ready,
  input  rgb_t       in_rgb,
  output logic       out_valid,
  input  logic       out_ready,
  output rgb_t       out_rgb
);
  localparam int unsigned NPIX      = WIDTH * HEIGHT;
  localparam int unsigned PW        = $clog2(NPIX);
  localparam int unsigned MODE_FIFO = 4;

  typedef enum logic [1:0] {ALG_SOBEL = 2'd0, ALG_SEDGE = 2'd1, ALG_SCORNER = 2'd2} alg_e;

  function automatic alg_e to_alg(input logic [1:0] m);
    return (m == 2'd3) ? ALG_SOBEL : alg_e'(m);
  endfunction

  logic [PW-1:0] icnt, ocnt;
  alg_e          imode_q, imode, omode;
  alg_e          fifo [MODE_FIFO];
  logic [1:0]    wp, rp;
  logic [2:0]    fill;
  logic          gate, push, pop;

  // a new frame may start only while the mode FIFO has room
  assign gate  = (icnt != 0) || (fill != 3'(MODE_FIFO));
  assign imode = (icnt == 0) ? to_alg(mode) : imode_q;
  assign omode = fifo[rp];

  logic [7:0] gray;
  assign gray = rgb_to_y(in_rgb);

  logic [2:0] k_iv, k_ir, k_ov, k_or;
  logic [7:0] k_op [3];

  sobel #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_sobel (
    .clk, .rst_n, .in_valid(k_iv[0]), .in_ready(k_ir[0]), .in_pix(gray),
    .out_valid(k_ov[0]), .out_ready(k_or[0]), .out_pix(k_op[0]));
  susan_edge #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_sedge (
    .clk, .rst_n, .in_valid(k_iv[1]), .in_ready(k_ir[1]), .in_pix(gray),
    .out_valid(k_ov[1]), .out_ready(k_or[1]), .out_pix(k_op[1]));
  susan_corner #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_scorner (
    .clk, .rst_n, .in_valid(k_iv[2]), .in_ready(k_ir[2]), .in_pix(gray),
    .out_valid(k_ov[2]), .out_ready(k_or[2]), .out_pix(k_op[2]));

  always_comb begin
    k_iv = '0;
    k_or = '0;
    k_iv[imode] = in_valid && gate;
    k_or[omode] = out_ready;
  end
  assign in_ready  = k_ir[imode] && gate;
  assign out_valid = k_ov[omode] && fill != 0;
  assign out_rgb   = '{r: k_op[omode], g: k_op[omode], b: k_op[omode]};

  assign push = in_valid && in_ready && icnt == 0;
  assign pop  = out_valid && out_ready && ocnt == PW'(NPIX - 1);

  always_ff @(posedge clk) begin
    if (push) fifo[wp] <= imode;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt    <= '0;
      ocnt    <= '0;
      imode_q <= ALG_SOBEL;
      wp      <= '0;
      rp      <= '0;
      fill    <= '0;
    end else begin
      if (in_valid && in_ready) begin
        imode_q <= imode;
        icnt    <= (icnt == PW'(NPIX - 1)) ? '0 : icnt + 1'b1;
      end
      if (out_valid && out_ready) begin
        ocnt <= (ocnt == PW'(NPIX - 1)) ? '0 : ocnt + 1'b1;
      end
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      fill <= fill + 3'(push) - 3'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) fill <= 3'(MODE_FIFO));

endmodule
