// tb_huff_dec: self-checking test of the Huffman decoder. Three frames of
// random difference symbols are coded by the reference packer and sent back
// to back, so frame-end padding must be dropped correctly. Bytes enter with
// random gaps and symbols leave under random back-pressure; every symbol and
// its channel tag are compared and err must never pulse. A fourth part
// sends a byte stream containing an invalid code word and checks that err
// pulses.
module tb_huff_dec;
  import ref_pkg::*;
  localparam int W = 5, H = 2, NF = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, err;
  logic [7:0] in_data, out_sym;
  logic [1:0] out_ch;
  int checks = 0, failures = 0, nsym = 0, errs = 0, padded = 0;
  int exp_q[$];
  bit expect_err = 0;

  huff_dec #(.WIDTH(W), .HEIGHT(H)) dut (.*);

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
    if (rst_n) begin
      if (out_valid && out_ready && !expect_err) begin
        check(exp_q.size() > 0 && out_sym == 8'(exp_q[0]) && out_ch == 2'(nsym % 3),
              $sformatf("symbol %0d: %02x ch %0d, expected %02x", nsym, out_sym, out_ch,
                        exp_q.size() ? exp_q[0] : -1));
        if (exp_q.size()) void'(exp_q.pop_front());
        nsym++;
      end
      if (err) errs++;
    end
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  task automatic send_byte(byte unsigned b);
    @(negedge clk);
    while ($urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
    in_valid = 1; in_data = b;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
  endtask

  initial begin
    int syms[$];
    byte unsigned bytes[$];
    init_tables();
    in_valid = 0; in_data = 0; out_ready = 0;
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
      foreach (syms[i]) exp_q.push_back(syms[i]);
      foreach (bytes[i]) send_byte(bytes[i]);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (100) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("%0d symbols missing", exp_q.size()));
    check(nsym == 3 * W * H * NF, $sformatf("%0d symbols decoded", nsym));
    check(errs == 0, $sformatf("err pulsed %0d times on valid data", errs));
    check(padded > 0, "no frame needed padding");
    // 0xFF 0xFF starts with twelve ones: no luma code word begins that way
    expect_err = 1;
    send_byte(8'hFF);
    send_byte(8'hFF);
    @(negedge clk);
    in_valid = 0;
    repeat (20) @(posedge clk);
    check(errs > 0, "err did not pulse on an invalid code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
