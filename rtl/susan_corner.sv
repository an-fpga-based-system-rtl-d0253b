// susan_corner: SUSAN corner detector on a gray image stream.
//
// Same front end as susan_edge: a 7 x 7 window and the USAN area n of the
// 37-pixel mask with brightness threshold T. A pixel is a corner candidate
// when n is below the geometric threshold g = 37/2, i.e. 18, and the USAN
// centroid lies at least one pixel from the nucleus, tested without
// division as sx^2 + sy^2 >= n^2. This rejects thin lines and noise
// whose USAN is small but centred. The response is (g - n) * 8. The rule is
// the published SUSAN corner rule, named but not detailed in the document;
// the one-pixel centroid distance, scaling and lack of non-maximum
// suppression are this design's choices.
//
// Pipeline: window register, USAN stage, centroid test and response stage.
// Interface and timing as susan_edge.
module susan_corner #(
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
  localparam logic [5:0] G = 6'd18;   // half of 37, rounded down

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

  logic              s1_valid, en1, en2;
  logic [5:0]        n_q;
  logic signed [6:0] sx_q, sy_q;
  logic [11:0]       dist2, n2;
  assign en2     = !out_valid || out_ready;
  assign en1     = !s1_valid || en2;
  assign w_ready = en1;

  always_comb begin
    dist2 = 12'(sx_q * sx_q) + 12'(sy_q * sy_q);
    n2    = 12'(n_q) * 12'(n_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      out_valid <= 1'b0;
      n_q       <= '0;
      sx_q      <= '0;
      sy_q      <= '0;
      out_pix   <= '0;
    end else begin
      if (en1) begin
        s1_valid <= w_valid;
        n_q      <= n;
        sx_q     <= sx;
        sy_q     <= sy;
      end
      if (en2) begin
        out_valid <= s1_valid;
        out_pix   <= (n_q < G && dist2 >= n2) ? {2'(0), 6'(G - n_q)} << 3 : 8'd0;
      end
    end
  end

endmodule
