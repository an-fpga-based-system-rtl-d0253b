// tb_img_enc: self-checking test of the image encoder. Two frames (a shaded
// test picture and pure random colours, which reach the saturation of the
// colour channels) are fed as RGB pixels with random gaps; the Y, U, V
// difference symbols, taken under random back-pressure, must match the
// reference colour transform and neighbour prediction, including the border
// rules. The second frame also checks that the row/column state restarts.
module tb_img_enc;
  import ref_pkg::*;
  import vision_pkg::rgb_t;
  localparam int W = 5, H = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  rgb_t in_rgb;
  logic [7:0] out_sym;
  logic [1:0] out_ch;
  int checks = 0, failures = 0, nsym = 0;
  int exp_q[$];

  img_enc #(.WIDTH(W), .HEIGHT(H)) dut (.*);

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

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      check(exp_q.size() > 0 && out_sym == 8'(exp_q[0]) && out_ch == 2'(nsym % 3),
            $sformatf("symbol %0d: %02x ch %0d, expected %02x", nsym, out_sym, out_ch,
                      exp_q.size() ? exp_q[0] : -1));
      if (exp_q.size()) void'(exp_q.pop_front());
      nsym++;
    end
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  initial begin
    int img[][3];
    int syms[$];
    in_valid = 0; in_rgb = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      if (f == 0) make_image(W, H, 3, img);
      else begin
        img = new[W * H];
        foreach (img[i]) for (int k = 0; k < 3; k++) img[i][k] = $urandom_range(0, 255);
      end
      frame_to_syms(W, H, img, syms);
      foreach (syms[i]) exp_q.push_back(syms[i]);
      for (int i = 0; i < W * H; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in_rgb = '{r: 8'(img[i][0]), g: 8'(img[i][1]), b: 8'(img[i][2])};
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (50) @(posedge clk);
    check(exp_q.size() == 0 && nsym == 6 * W * H, $sformatf("%0d symbols seen", nsym));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
