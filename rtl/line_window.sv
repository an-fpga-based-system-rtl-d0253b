// line_window: neighbourhood window generator for raster-scan image
// operators. From a stream of gray pixels it produces, for every pixel of
// the frame and in the same order, the K x K window centred on it.
//
// K-1 line memories hold the previous rows; with the incoming pixel they
// form one new window column per step, which shifts into a K x K register
// array. The window for the pixel at (r, c) is complete once the pixel at
// (r + R, c + R) has arrived (R = (K-1)/2), so the block runs a scan
// position counter that goes R rows and R pixels past the end of the
// frame: those last steps need no input and flush the final windows. Window
// pixels that lie outside the image are replaced by the centre pixel, so an
// operator sees a flat surround at the border. Line buffering, the flush and
// the border rule are this design's choices; the document only names the
// operators that use it.
//
// Interface: in_valid/in_ready/in_pix (one pixel per cycle), out_valid/
// out_ready/out_win; out_win[(r*K + c)*8 +: 8] is row r (0 = top), column c
// (0 = left). out_row/out_col give the centre's coordinates. Latency from a
// pixel to its window is R rows + R pixels + 1 cycle.
module line_window #(
  parameter int unsigned K      = 3,
  parameter int unsigned WIDTH  = 320,
  parameter int unsigned HEIGHT = 240
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [7:0]         in_pix,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [K*K*8-1:0]   out_win,
  output logic [$clog2(HEIGHT)-1:0] out_row,
  output logic [$clog2(WIDTH)-1:0]  out_col
);
  localparam int unsigned R  = (K - 1) / 2;
  localparam int unsigned XW = $clog2(WIDTH);
  localparam int unsigned YW = $clog2(HEIGHT + R + 1);
  localparam int unsigned OW = $clog2(HEIGHT);

  logic [XW-1:0] vc;            // scan position (may run past the frame)
  logic [YW-1:0] vr;
  logic [XW-1:0] nc;            // centre of the next window to be emitted
  logic [OW-1:0] nr;
  logic [7:0]    win [K][K];
  logic [7:0]    col_in [K];    // new window column, col_in[K-1] = newest row

  logic need_in, step, emit_next, last_pos;
  assign need_in   = vr < YW'(HEIGHT);
  assign step      = (!need_in || in_valid) && (!out_valid || out_ready);
  assign in_ready  = need_in && (!out_valid || out_ready);
  assign emit_next = (vr > YW'(R)) || (vr == YW'(R) && vc >= XW'(R));
  assign last_pos  = (vr == YW'(HEIGHT + R)) && (vc == XW'(R - 1));

  // line memories: line j holds the row j+1 above the scan position
  for (genvar j = 0; j < K - 1; j++) begin : g_line
    logic [7:0] mem [WIDTH];
    logic [7:0] wr;
    assign col_in[K-2-j] = mem[vc];
    if (j == 0) begin : g_first
      assign wr = need_in ? in_pix : 8'd0;
    end else begin : g_next
      assign wr = g_line[j-1].mem[vc];
    end
    always_ff @(posedge clk) begin
      if (step) mem[vc] <= wr;
    end
  end
  assign col_in[K-1] = need_in ? in_pix : 8'd0;

  always_ff @(posedge clk) begin
    if (step) begin
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) win[r][c] <= win[r][c+1];
        win[r][K-1] <= col_in[r];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vc        <= '0;
      vr        <= '0;
      nc        <= '0;
      nr        <= '0;
      out_valid <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (step) begin
        if (last_pos) begin
          vc <= '0;
          vr <= '0;
        end else if (vc == XW'(WIDTH - 1)) begin
          vc <= '0;
          vr <= vr + 1'b1;
        end else begin
          vc <= vc + 1'b1;
        end
        if (emit_next) begin
          out_valid <= 1'b1;
          out_row   <= nr;
          out_col   <= nc;
          if (nc == XW'(WIDTH - 1)) begin
            nc <= '0;
            nr <= (nr == OW'(HEIGHT - 1)) ? '0 : nr + 1'b1;
          end else begin
            nc <= nc + 1'b1;
          end
        end
      end
    end
  end

  // border replacement on the registered window
  always_comb begin
    for (int r = 0; r < K; r++) begin
      for (int c = 0; c < K; c++) begin
        logic signed [OW+1:0] ir;
        logic signed [XW+1:0] ic;
        ir = $signed({2'b00, out_row}) + (OW+2)'(r) - (OW+2)'(R);
        ic = $signed({2'b00, out_col}) + (XW+2)'(c) - (XW+2)'(R);
        if (ir < 0 || ir >= (OW+2)'(HEIGHT) || ic < 0 || ic >= (XW+2)'(WIDTH))
          out_win[(r*K + c)*8 +: 8] = win[R][R];
        else
          out_win[(r*K + c)*8 +: 8] = win[r][c];
      end
    end
  end

endmodule
