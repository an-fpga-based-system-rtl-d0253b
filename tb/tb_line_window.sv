// tb_line_window: self-checking test of the window generator with a 3 x 3
// and a 7 x 7 instance on small frames (two frames each, the second
// different). Pixels enter with random gaps and windows leave under random
// back-pressure; every window element of every output pixel is compared
// with the reference, where positions outside the image take the centre
// value, and the centre coordinates are checked too.
module tb_line_window;
  import ref_pkg::*;
  localparam int W = 9, H = 8;

  logic clk = 0, rst_n = 0;
  logic in_valid, both_valid;
  logic [7:0] in_pix;
  logic [1:0] in_ready, out_valid, out_ready;
  logic [3*3*8-1:0] win3;
  logic [7*7*8-1:0] win7;
  logic [2:0] row3, row7;
  logic [3:0] col3, col7;
  int checks = 0, failures = 0;
  int img[];
  int frames[2][];
  int nout[2] = '{0, 0};

  // a pixel is offered to both instances only when both can take it
  assign both_valid = in_valid && in_ready[0] && in_ready[1];

  line_window #(.K(3), .WIDTH(W), .HEIGHT(H)) dut3 (
    .clk, .rst_n, .in_valid(both_valid), .in_ready(in_ready[0]), .in_pix,
    .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_win(win3),
    .out_row(row3), .out_col(col3));
  line_window #(.K(7), .WIDTH(W), .HEIGHT(H)) dut7 (
    .clk, .rst_n, .in_valid(both_valid), .in_ready(in_ready[1]), .in_pix,
    .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_win(win7),
    .out_row(row7), .out_col(col7));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit win_ok(int k, int n, logic [7*7*8-1:0] w);
    int f, p, r, c, rr;
    f = n / (W * H); p = n % (W * H); r = p / W; c = p % W;
    rr = (k - 1) / 2;
    set_image(W, H, frames[f]);
    for (int dr = -rr; dr <= rr; dr++)
      for (int dc = -rr; dc <= rr; dc++)
        if (w[((dr + rr) * k + dc + rr) * 8 +: 8] != 8'(px(r, c, dr, dc)))
          return 0;
    return 1;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid[0] && out_ready[0]) begin
        check(win_ok(3, nout[0], {{(49-9)*8{1'b0}}, win3}) && row3 == 3'((nout[0] % (W*H)) / W)
              && col3 == 4'(nout[0] % W), $sformatf("3x3 window %0d", nout[0]));
        nout[0]++;
      end
      if (out_valid[1] && out_ready[1]) begin
        check(win_ok(7, nout[1], win7) && row7 == 3'((nout[1] % (W*H)) / W)
              && col7 == 4'(nout[1] % W), $sformatf("7x7 window %0d", nout[1]));
        nout[1]++;
      end
    end
  end
  always @(negedge clk) out_ready = {1'($urandom_range(0, 3) != 0), 1'($urandom_range(0, 3) != 0)};

  initial begin
    in_valid = 0; in_pix = 0; out_ready = 0;
    for (int f = 0; f < 2; f++) begin
      frames[f] = new[W * H];
      foreach (frames[f][i]) frames[f][i] = (f == 0) ? $urandom_range(0, 255) : (i * 7) % 256;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < W * H; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_pix = 8'(frames[f][i]);
        #1;
        while (!(in_ready[0] && in_ready[1])) begin @(negedge clk); #1; end
      end
    @(negedge clk);
    in_valid = 0;
    repeat (300) @(posedge clk);
    check(nout[0] == 2 * W * H, $sformatf("3x3 gave %0d windows", nout[0]));
    check(nout[1] == 2 * W * H, $sformatf("7x7 gave %0d windows", nout[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
