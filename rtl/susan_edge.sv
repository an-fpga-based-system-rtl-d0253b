// susan_edge: SUSAN edge detector on a gray image stream.
//
// For each pixel a 7 x 7 window (line_window) gives the 37-pixel SUSAN mask;
// susan_usan counts the USAN area n, the number of mask pixels whose
// brightness is within T of the nucleus. The edge response is g - n where
// n < g and zero elsewhere, with the geometric threshold g = 3/4 of the
// 37-pixel maximum, i.e. 27. The output pixel is the response times 8 (at
// most 208). The method is the published SUSAN edge rule, named but not
// detailed in the document; the hard threshold, the scaling and the absence
// of non-maximum suppression are this design's choices.
//
// Pipeline: window register, USAN stage, response stage. Interface:
// in_valid/in_ready/in_pix, out_valid/out_ready/out_pix; one pixel per
// cycle, latency three rows plus six cycles; WIDTH*HEIGHT results per frame.
module susan_edge #(
  parameter int unsigned WIDTH  = 320,
  parameter int unsigned HEIGHT = 240,
  parameter int unsigned T      = 20
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
  localparam logic [5:0] G = 6'd27;   // 3/4 of 37, rounded down

  logic                 w_valid, w_ready;
  logic [7*7*8-1:0]     w;
  logic [$clog2(HEIGHT)-1:0] w_row;
  logic [$clog2(WIDTH)-1:0]  w_col;

  line_window #(.K(7), .WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_win (
    .clk, .rst_n, .in_valid, .in_ready, .in_pix,
    .out_valid(w_valid), .out_ready(w_ready), .out_win(w),
    .out_row(w_row), .out_col(w_col)
  );

  logic [5:0]        n;
  logic signed [6:0] sx, sy;
  susan_usan #(.T(T)) u_usan (.win(w), .n, .sx, .sy);

  logic       s1_valid, en1, en2;
  logic [5:0] n_q;
  assign en2     = !out_valid || out_ready;
  assign en1     = !s1_valid || en2;
  assign w_ready = en1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      out_valid <= 1'b0;
      n_q       <= '0;
      out_pix   <= '0;
    end else begin
      if (en1) begin
        s1_valid <= w_valid;
        n_q      <= n;
      end
      if (en2) begin
        out_valid <= s1_valid;
        out_pix   <= (n_q < G) ? {2'(0), 6'(G - n_q)} << 3 : 8'd0;
      end
    end
  end

endmodule
