// tb_pp_if: self-checking test of the parallel port interface with the
// pp_host model on the PC side. The PC sends 40 random bytes while the FPGA
// side takes them with random delays; they must arrive in order and the
// writes made while the receive register is full must be held back. The
// FPGA side offers 40 random bytes with random gaps; the PC polls the
// tx_avail flag and reads them as nibble pairs, which must match. Writes and
// reads are interleaved.
module tb_pp_if;
  logic clk = 0, rst_n = 0;
  logic [7:0] pp_data, rx_data, tx_data;
  logic [1:0] pp_ctrl;
  logic [4:0] pp_status;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  int checks = 0, failures = 0, nrx = 0;
  byte unsigned sent[$], offer[$], got[$];

  pp_if dut (.*);
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
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FPGA side: receive with random ready, transmit with random valid
  always @(posedge clk) begin
    if (rst_n && rx_valid && rx_ready) begin
      check(sent.size() > 0 && rx_data == sent[0], $sformatf("rx byte %02x", rx_data));
      if (sent.size()) void'(sent.pop_front());
      nrx++;
    end
    if (rst_n && tx_valid && tx_ready) void'(offer.pop_front());
  end
  always @(negedge clk) begin
    rx_ready = ($urandom_range(0, 19) == 0);
    if (!tx_valid || offer.size() == 0) begin
      tx_valid = offer.size() > 0 && ($urandom_range(0, 3) == 0);
    end
    tx_data = offer.size() ? offer[0] : 8'h00;
  end

  initial begin
    int nw, nr;
    bit rx_free, tx_avail;
    tx_valid = 0; rx_ready = 0; tx_data = 0;
    for (int i = 0; i < 40; i++) offer.push_back(8'($urandom));
    foreach (offer[i]) got.push_back(offer[i]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    nw = 0; nr = 0;
    while (nw < 40 || nr < 40) begin
      pc.poll(rx_free, tx_avail);
      if (tx_avail && nr < 40 && ($urandom_range(0, 1) == 0 || nw == 40)) begin
        byte unsigned b;
        pc.read_byte(b);
        check(b == got[nr], $sformatf("PC read %02x, expected %02x", b, got[nr]));
        nr++;
      end else if (nw < 40) begin
        byte unsigned b;
        b = 8'($urandom);
        sent.push_back(b);
        pc.write_byte(b);
        nw++;
      end
    end
    repeat (100) @(posedge clk);
    check(nrx == 40, $sformatf("%0d bytes received", nrx));
    check(pc.slow_acks > 0, "no write was ever held back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
