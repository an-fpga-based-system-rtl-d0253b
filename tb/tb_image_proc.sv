// tb_image_proc: self-checking test of the image processing module. Six
// small RGB frames are streamed while the mode input changes at random
// moments, also in mid-frame; the mode sampled at each frame's first pixel
// decides the expected results (gray conversion, then Sobel, SUSAN edge or
// SUSAN corner, returned as R = G = B). The output is stalled for long
// stretches so that several frames are in flight in different detectors at
// once. Checks: every result, the number of results, that all three
// algorithms and mode value 3 (frame f starts with mode f mod 4) (treated as Sobel) were used, that a mode change
// inside a frame happened, and that at least two frames were in flight.
module tb_image_proc;
  import ref_pkg::*;
  import vision_pkg::rgb_t;
  localparam int W = 10, H = 6, NF = 6;

  logic clk = 0, rst_n = 0;
  logic [1:0] mode;
  logic in_valid, in_ready, out_valid, out_ready;
  rgb_t in_rgb, out_rgb;
  int checks = 0, failures = 0, nout = 0, nin = 0, max_flight = 0, mid_changes = 0;
  int frames[NF][];
  int fmode[NF];
  int used[4] = '{0, 0, 0, 0};
  bit stall = 0;

  image_proc #(.WIDTH(W), .HEIGHT(H)) dut (.*);

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
    if (rst_n) begin
      if (in_valid && in_ready) begin
        if (nin % (W * H) == 0) begin
          fmode[nin / (W * H)] = mode;
          used[mode]++;
        end
        nin++;
      end
      if (out_valid && out_ready) begin
        int f, p, e, m;
        f = nout / (W * H); p = nout % (W * H);
        m = (fmode[f] == 3) ? 0 : fmode[f];
        if (p == 0) set_image(W, H, frames[f]);
        e = algo_at(p / W, p % W, m);
        check(out_rgb.r == 8'(e) && out_rgb.g == 8'(e) && out_rgb.b == 8'(e),
              $sformatf("frame %0d (mode %0d) pixel %0d: %0d, expected %0d",
                        f, m, p, out_rgb.r, e));
        nout++;
      end
      if ((nin + W * H - 1) / (W * H) - nout / (W * H) > max_flight)
        max_flight = (nin + W * H - 1) / (W * H) - nout / (W * H);
    end
  end
  always @(negedge clk) begin
    out_ready = !stall && ($urandom_range(0, 3) != 0);
    if ($urandom_range(0, 99) == 0) stall = !stall;
    // random changes inside a frame must not affect that frame
    if (nin % (W * H) != 0 && $urandom_range(0, 40) == 0) begin
      mid_changes++;
      mode = 2'($urandom_range(0, 3));
    end
  end

  initial begin
    int rgb[][3];
    in_valid = 0; in_rgb = '0; out_ready = 0; mode = 0;
    for (int f = 0; f < NF; f++) begin
      make_image(W, H, 21 + f, rgb);
      frames[f] = new[W * H];
      foreach (frames[f][i]) frames[f][i] = gray(rgb[i][0], rgb[i][1], rgb[i][2]);
      // keep the RGB values so the module's own gray conversion is used
      for (int i = 0; i < W * H; i++) begin
        @(negedge clk);
        if (f == 0 && i == 0) rst_n = 1;
        if (i == 0) mode = 2'(f % 4);
        while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in_rgb = '{r: 8'(rgb[i][0]), g: 8'(rgb[i][1]), b: 8'(rgb[i][2])};
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
      end
    end
    @(negedge clk);
    in_valid = 0;
    wait (nout == NF * W * H || $time > 300000);
    check(nout == NF * W * H, $sformatf("%0d results", nout));
    check(used[0] > 0 && used[1] > 0 && used[2] > 0 && used[3] > 0,
          $sformatf("modes used %0d %0d %0d %0d", used[0], used[1], used[2], used[3]));
    check(mid_changes > 0, "mode never changed inside a frame");
    check(max_flight >= 2, $sformatf("at most %0d frames in flight", max_flight));
    $display("modes used %0d %0d %0d %0d, mid-frame changes %0d, frames in flight %0d",
             used[0], used[1], used[2], used[3], mid_changes, max_flight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
