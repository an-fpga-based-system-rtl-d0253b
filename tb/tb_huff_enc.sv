// tb_huff_enc: self-checking test of the Huffman encoder. Three frames of
// random difference symbols (biased towards small values, with some of every
// code length) are fed with random gaps; the output bytes, taken with random
// back-pressure, must equal the reference packing (canonical tables, MSB
// first, each frame padded to a byte). frame_done must pulse once per frame.
module tb_huff_enc;
  import ref_pkg::*;
  localparam int W = 4, H = 3, NF = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, frame_done;
  logic [7:0] in_sym, out_data;
  logic [1:0] in_ch;
  int checks = 0, failures = 0, frames_seen = 0, padded = 0;
  byte unsigned exp_q[$];

  huff_enc #(.WIDTH(W), .HEIGHT(H)) dut (.*);

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

  // output side: random ready, compare bytes
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        check(exp_q.size() > 0 && out_data == exp_q[0],
              $sformatf("byte %02x expected %02x", out_data, exp_q.size() ? exp_q[0] : 0));
        if (exp_q.size()) void'(exp_q.pop_front());
      end
      if (frame_done) frames_seen++;
    end
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  initial begin
    int syms[$];
    byte unsigned bytes[$];
    init_tables();
    in_valid = 0; in_sym = 0; in_ch = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      syms.delete();
      for (int i = 0; i < 3 * W * H; i++) begin
        int v, bits;
        bits = (i % 3) ? 6 : 8;
        case ($urandom_range(0, 4))
          0: v = 0;
          1: v = $urandom_range(0, 3) - 1;
          2: v = $urandom_range(0, 20) - 10;
          default: v = $urandom_range(0, (1 << bits) - 1);
        endcase
        syms.push_back(((v % (1 << bits)) + (1 << bits)) % (1 << bits));
      end
      syms_to_bytes(syms, bytes);
      if (code_bits(syms) % 8 != 0) padded++;
      foreach (bytes[i]) exp_q.push_back(bytes[i]);
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
    repeat (200) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("%0d bytes missing", exp_q.size()));
    check(frames_seen == NF, $sformatf("frame_done %0d times", frames_seen));
    check(padded > 0, "no frame needed padding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
