// tb_susan_corner: self-checking test of the SUSAN corner detector. Three frames of a gray test
// picture (shading, a bright rectangle, a dark wedge, noise) are streamed
// through. The first two use random input gaps and random output
// back-pressure; every result is compared with the reference operator
// (outside pixels take the centre value). The third runs with no gaps and
// checks the rate of one pixel per cycle: the frame must be through within
// WIDTH*HEIGHT cycles plus the window fill of three rows and a few cycles.
// The picture must also produce some non-zero responses.
module tb_susan_corner;
  import ref_pkg::*;
  localparam int W = 24, H = 16, NF = 3, MODE = 2, R = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_pix, out_pix;
  int checks = 0, failures = 0, nout = 0, nonzero = 0;
  int frames[NF][];
  bit full_rate = 0;
  longint t_first, t_last;

  susan_corner #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int f, p, e;
      f = nout / (W * H); p = nout % (W * H);
      if (p == 0) set_image(W, H, frames[f]);
      e = algo_at(p / W, p % W, MODE);
      check(out_pix == 8'(e), $sformatf("frame %0d pixel (%0d,%0d): %0d, expected %0d",
                                       f, p / W, p % W, out_pix, e));
      if (out_pix != 0) nonzero++;
      nout++;
      if (nout == NF * W * H) t_last = $time / 10;
    end
  end
  always @(negedge clk) out_ready = full_rate || ($urandom_range(0, 3) != 0);

  initial begin
    int rgb[][3];
    in_valid = 0; in_pix = 0; out_ready = 0;
    for (int f = 0; f < NF; f++) begin
      make_image(W, H, 11 + f, rgb);
      frames[f] = new[W * H];
      foreach (frames[f][i]) frames[f][i] = gray(rgb[i][0], rgb[i][1], rgb[i][2]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      if (f == NF - 1) begin
        @(negedge clk);
        in_valid = 0;
        wait (nout == (NF - 1) * W * H);
        full_rate = 1;
      end
      for (int i = 0; i < W * H; i++) begin
        @(negedge clk);
        while (!full_rate && $urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_pix = 8'(frames[f][i]);
        if (full_rate && i == 0) t_first = $time / 10;
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat ((R + 2) * W + 50) @(posedge clk);
    check(nout == NF * W * H, $sformatf("%0d results", nout));
    check(nonzero > 0, "no non-zero response");
    check(t_last - t_first <= longint'(W * H + R * W + R + 8),
          $sformatf("frame took %0d cycles", t_last - t_first));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
