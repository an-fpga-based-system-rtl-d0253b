// tb_vision_top_full: end-to-end test of the whole FPGA side, at the default 320 x 240 frame size.
// A PC model (pp_host) does what the PC software does: it compresses each
// frame of a test picture into Huffman-coded prediction differences, sends
// the bytes over the parallel port, and reads back the processed,
// re-compressed frame. The expected return bytes are computed independently:
// reference decoding of what was sent, gray conversion, the selected
// detector, reference re-encoding. Every returned byte is compared.
// Mechanisms that must occur at least once (each counts a failure if not):
// each algorithm used (Sobel, SUSAN corner, SUSAN edge, and mode value 3 as Sobel), the PC finding the receive register busy
// and holding off, the output held back because the PC was busy writing,
// 12-bit code words in the input, frame-end padding in the input and the
// output. The decoder error flag must stay low and frame_sent must pulse
// once per frame.
module tb_vision_top_full;
  import ref_pkg::*;
  localparam int W = 320, H = 240, NF = 4;
  localparam int MODES[4] = '{0, 2, 1, 3};

  logic clk = 0, rst_n = 0;
  logic [1:0] mode;
  logic [7:0] pp_data;
  logic [1:0] pp_ctrl;
  logic [4:0] pp_status;
  logic       dec_err, frame_sent;
  int         nframes_sent = 0;
  int checks = 0, failures = 0;
  int used[3] = '{0, 0, 0};
  int busy_polls = 0, out_held = 0, long_codes = 0, pad_in = 0, pad_out = 0, errs = 0;
  byte unsigned to_send[$], expect_q[$];
  int frame_start[$];   // index in to_send of each frame's first byte

  vision_top dut (.clk, .rst_n, .mode, .pp_data, .pp_ctrl, .pp_status, .dec_err, .frame_sent);
  pp_host pc (.clk, .pp_data, .pp_ctrl, .pp_status);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (80000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.tx_valid && !dut.tx_ready) out_held++;
      if (dec_err) errs++;
      if (frame_sent) begin
        nframes_sent++;
        $display("frame %0d returned at clock %0d", nframes_sent, $time / 10);
      end
    end
  end

  initial begin
    int rgb[][3], rec[][3], res[][3];
    int syms[$], osyms[$];
    byte unsigned bytes[$];
    int nsent, nread, total_out, f;
    bit rx_free, tx_avail;
    init_tables();
    mode = 0;
    // prepare all frames and their expected results
    for (int k = 0; k < NF; k++) begin
      int m;
      m = MODES[k % 4];
      make_image(W, H, 31 + k, rgb);
      frame_to_syms(W, H, rgb, syms);
      for (int i = 0; i < syms.size(); i++)
        if ((i % 3) == 0 && luma_len[sym_index(0, syms[i])] == 12) long_codes++;
      if (code_bits(syms) % 8 != 0) pad_in++;
      syms_to_bytes(syms, bytes);
      frame_start.push_back(to_send.size());
      foreach (bytes[i]) to_send.push_back(bytes[i]);
      syms_to_frame(W, H, syms, rec);
      begin
        int g[];
        g = new[W * H];
        foreach (g[i]) g[i] = gray(rec[i][0], rec[i][1], rec[i][2]);
        set_image(W, H, g);
      end
      res = new[W * H];
      foreach (res[i]) begin
        int e;
        e = algo_at(i / W, i % W, (m == 3) ? 0 : m);
        res[i] = '{e, e, e};
      end
      used[(m == 3) ? 0 : m]++;
      frame_to_syms(W, H, res, osyms);
      if (code_bits(osyms) % 8 != 0) pad_out++;
      syms_to_bytes(osyms, bytes);
      foreach (bytes[i]) expect_q.push_back(bytes[i]);
    end
    total_out = expect_q.size();
    $display("%0d frames of %0dx%0d: %0d bytes to send, %0d bytes expected back",
             NF, W, H, to_send.size(), total_out);
    repeat (3) @(posedge clk);
    rst_n = 1;
    nsent = 0; nread = 0; f = 0;
    while (nsent < to_send.size() || nread < total_out) begin
      if (f < NF && nsent == frame_start[f]) begin
        mode = 2'(MODES[f % 4]);
        f++;
      end
      pc.poll(rx_free, tx_avail);
      if (nsent < to_send.size() && !rx_free) busy_polls++;
      if (tx_avail && (nsent == to_send.size() || !rx_free || $urandom_range(0, 3) == 0)) begin
        byte unsigned b;
        pc.read_byte(b);
        check(b == expect_q[nread], $sformatf("returned byte %0d: %02x, expected %02x",
                                              nread, b, expect_q[nread]));
        nread++;
      end else if (nsent < to_send.size() && rx_free) begin
        pc.write_byte(to_send[nsent]);
        nsent++;
      end
    end
    repeat (20) @(posedge clk);
    check(nread == total_out, "not all bytes returned");
    check(nframes_sent == NF, $sformatf("frame_sent pulsed %0d times", nframes_sent));
    check(errs == 0, $sformatf("decoder error flag rose %0d times", errs));
    check(used[0] > 0, "Sobel never used");
    check(used[1] > 0, "SUSAN edge never used");
    check(used[2] > 0, "SUSAN corner never used");
    check(busy_polls > 0, "receive register never busy");
    check(out_held > 0, "output never held back");
    check(long_codes > 0, "no 12-bit code word sent");
    check(pad_in > 0, "no input frame needed padding");
    check(pad_out > 0, "no output frame needed padding");
    $display("frames: Sobel %0d, SUSAN edge %0d, SUSAN corner %0d", used[0], used[1], used[2]);
    $display("busy polls %0d, output-held cycles %0d, 12-bit codes %0d, padded in/out %0d/%0d",
             busy_polls, out_held, long_codes, pad_in, pad_out);
    $display("cycles %0d", $time / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
