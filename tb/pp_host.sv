// pp_host: behavioural model of the PC side of the parallel port link, for
// testbenches. It drives the data and control lines and reads the status
// lines with the toggle handshake of pp_if: set the lines up, wait a clock,
// invert the request, wait until the acknowledge equals the request. All
// line changes and samples happen on the falling clock edge. Tasks:
//   poll(rx_free, tx_avail)  read the two flags (write direction)
//   write_byte(b)            send one byte
//   read_byte(b)             fetch one byte as high then low nibble
// slow_acks counts transfers whose acknowledge took more than six clocks,
// i.e. the FPGA side held the transfer back.
module pp_host (
  input  logic       clk,
  output logic [7:0] pp_data,
  output logic [1:0] pp_ctrl,
  input  logic [4:0] pp_status
);
  int slow_acks = 0;
  int writes = 0;
  int reads = 0;

  initial begin
    pp_data = '0;
    pp_ctrl = '0;
  end

  task automatic set_dir(bit d);
    if (pp_ctrl[1] != d) begin
      @(negedge clk);
      pp_ctrl[1] = d;
      repeat (3) @(negedge clk);
    end
  endtask

  task automatic handshake();
    int n;
    @(negedge clk);
    pp_ctrl[0] = ~pp_ctrl[0];
    n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (pp_status[4] != pp_ctrl[0]);
    if (n > 6) slow_acks++;
  endtask

  task automatic poll(output bit rx_free, output bit tx_avail);
    set_dir(1'b0);
    @(negedge clk);
    rx_free  = pp_status[0];
    tx_avail = pp_status[1];
  endtask

  task automatic write_byte(input byte unsigned b);
    set_dir(1'b0);
    @(negedge clk);
    pp_data = b;
    handshake();
    writes++;
  endtask

  task automatic read_byte(output byte unsigned b);
    set_dir(1'b1);
    handshake();
    b[7:4] = pp_status[3:0];
    handshake();
    b[3:0] = pp_status[3:0];
    reads++;
  endtask
endmodule
