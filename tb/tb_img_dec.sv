// tb_img_dec: self-checking test of the image decoder. The reference model
// turns two frames (a shaded test picture and random colours) into Y, U, V
// difference symbols; these are fed with random gaps, and each RGB pixel,
// taken under random back-pressure, must equal the reference reconstruction
// (prediction undone, inverse colour transform, clamping).
module tb_img_dec;
  import ref_pkg::*;
  import vision_pkg::rgb_t;
  localparam int W = 6, H = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_sym;
  logic [1:0] in_ch;
  rgb_t out_rgb;
  int checks = 0, failures = 0, npix = 0;
  int exp_q[$];

  img_dec #(.WIDTH(W), .HEIGHT(H)) dut (.*);

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
      check(exp_q.size() >= 3 && out_rgb.r == 8'(exp_q[0]) && out_rgb.g == 8'(exp_q[1])
            && out_rgb.b == 8'(exp_q[2]),
            $sformatf("pixel %0d: %02x %02x %02x", npix, out_rgb.r, out_rgb.g, out_rgb.b));
      repeat (3) if (exp_q.size()) void'(exp_q.pop_front());
      npix++;
    end
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  initial begin
    int img[][3], rec[][3];
    int syms[$];
    in_valid = 0; in_sym = 0; in_ch = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      if (f == 0) make_image(W, H, 5, img);
      else begin
        img = new[W * H];
        foreach (img[i]) for (int k = 0; k < 3; k++) img[i][k] = $urandom_range(0, 255);
      end
      frame_to_syms(W, H, img, syms);
      syms_to_frame(W, H, syms, rec);
      foreach (rec[i]) for (int k = 0; k < 3; k++) exp_q.push_back(rec[i][k]);
      for (int i = 0; i < syms.size(); i++) begin
        @(negedge clk);
        while ($urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_sym = 8'(syms[i]); in_ch = 2'(i % 3);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (50) @(posedge clk);
    check(exp_q.size() == 0 && npix == 2 * W * H, $sformatf("%0d pixels seen", npix));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
