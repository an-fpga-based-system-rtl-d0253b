// sobel: Sobel edge detector on a gray image stream.
//
// A 3 x 3 window (line_window) feeds two pipeline stages. Stage 1 forms the
// horizontal and vertical gradients with the usual Sobel kernels,
//   Gx = (p02 + 2 p12 + p22) - (p00 + 2 p10 + p20)
//   Gy = (p20 + 2 p21 + p22) - (p00 + 2 p01 + p02),
// and stage 2 outputs |Gx| + |Gy| saturated to 255. The operator is the one
// the document names; the |Gx| + |Gy| magnitude, the two-stage pipeline and
// the border rule of line_window are this design's choices.
//
// Interface: in_valid/in_ready/in_pix, out_valid/out_ready/out_pix. One
// pixel per cycle; latency one row plus four cycles; exactly WIDTH*HEIGHT
// results per frame, in raster order.
module sobel #(
  parameter int unsigned WIDTH  = 320,
  parameter int unsigned HEIGHT = 240
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_pix,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_pix
);
  logic                 w_valid, w_ready;
  logic [3*3*8-1:0]     w;
  logic [$clog2(HEIGHT)-1:0] w_row;
  logic [$clog2(WIDTH)-1:0]  w_col;

  line_window #(.K(3), .WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_win (
    .clk, .rst_n, .in_valid, .in_ready, .in_pix,
    .out_valid(w_valid), .out_ready(w_ready), .out_win(w),
    .out_row(w_row), .out_col(w_col)
  );

  function automatic logic signed [11:0] px(input logic [3*3*8-1:0] win, input int r, input int c);
    return $signed({4'b0000, win[(r*3 + c)*8 +: 8]});
  endfunction

  logic               s1_valid, en1, en2;
  logic signed [11:0] gx_q, gy_q;
  logic [11:0]        ax, ay, sum;

  assign en2     = !out_valid || out_ready;
  assign en1     = !s1_valid || en2;
  assign w_ready = en1;

  always_comb begin
    ax  = gx_q[11] ? 12'(-gx_q) : 12'(gx_q);
    ay  = gy_q[11] ? 12'(-gy_q) : 12'(gy_q);
    sum = ax + ay;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      out_valid <= 1'b0;
      gx_q      <= '0;
      gy_q      <= '0;
      out_pix   <= '0;
    end else begin
      if (en1) begin
        s1_valid <= w_valid;
        gx_q <= (px(w,0,2) + 2*px(w,1,2) + px(w,2,2)) - (px(w,0,0) + 2*px(w,1,0) + px(w,2,0));
        gy_q <= (px(w,2,0) + 2*px(w,2,1) + px(w,2,2)) - (px(w,0,0) + 2*px(w,0,1) + px(w,0,2));
      end
      if (en2) begin
        out_valid <= s1_valid;
        out_pix   <= (sum > 12'd255) ? 8'd255 : 8'(sum);
      end
    end
  end

endmodule
