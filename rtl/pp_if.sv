// pp_if: parallel port interface between the PC and the processing chain.
//
// The PC drives the eight data lines and two control lines; the FPGA drives
// five status lines. Every transfer is one toggle handshake: the PC sets up
// its lines, then inverts the request line pp_ctrl[0]; the FPGA completes
// the transfer and makes the acknowledge line pp_status[4] equal to the
// request. pp_ctrl[1] selects the direction.
//   dir = 0 (PC writes): a request delivers the byte on pp_data. It is
//     acknowledged once the byte has been taken into the receive register.
//     Between transfers pp_status[3:0] = {0, 0, tx_avail, rx_free} so the
//     PC can poll before it writes or reads.
//   dir = 1 (PC reads): each request returns one nibble on pp_status[3:0],
//     the high nibble of the next output byte first, then its low nibble.
//     The request stays unacknowledged until a byte is available.
// Inputs pass two synchronising flip-flops; the PC must set pp_data and the
// direction at least one clock before it toggles the request. The document
// says only that the parallel cable carries the image data; the handshake,
// the nibble return path and the line assignment are this design's choices.
//
// Stream side: rx_valid/rx_ready/rx_data (bytes from the PC), tx_valid/
// tx_ready/tx_data (bytes to the PC).
module pp_if (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] pp_data,
  input  logic [1:0] pp_ctrl,
  output logic [4:0] pp_status,
  output logic       rx_valid,
  input  logic       rx_ready,
  output logic [7:0] rx_data,
  input  logic       tx_valid,
  output logic       tx_ready,
  input  logic [7:0] tx_data
);
  logic [7:0] data_s1, data_s2;
  logic [1:0] ctrl_s1, ctrl_s2;
  logic       ack_q;
  logic       low_q;     // low nibble of tx byte still to be sent
  logic [3:0] low_nib_q;
  logic [3:0] nib_q;
  logic       pending, dir, wr_take, rd_new, rd_low;

  assign dir      = ctrl_s2[1];
  assign pending  = ctrl_s2[0] != ack_q;
  assign wr_take  = pending && !dir && !rx_valid;
  assign rd_low   = pending && dir && low_q;
  assign rd_new   = pending && dir && !low_q && tx_valid;
  assign tx_ready = rd_new;

  assign pp_status = {ack_q, dir ? nib_q : {2'b00, tx_valid || low_q, !rx_valid}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_s1   <= '0;
      data_s2   <= '0;
      ctrl_s1   <= '0;
      ctrl_s2   <= '0;
      ack_q     <= 1'b0;
      low_q     <= 1'b0;
      low_nib_q <= '0;
      nib_q     <= '0;
      rx_valid  <= 1'b0;
      rx_data   <= '0;
    end else begin
      data_s1 <= pp_data;
      data_s2 <= data_s1;
      ctrl_s1 <= pp_ctrl;
      ctrl_s2 <= ctrl_s1;
      if (rx_valid && rx_ready) rx_valid <= 1'b0;
      if (wr_take) begin
        rx_valid <= 1'b1;
        rx_data  <= data_s2;
        ack_q    <= ctrl_s2[0];
      end
      if (rd_new) begin
        nib_q     <= tx_data[7:4];
        low_nib_q <= tx_data[3:0];
        low_q     <= 1'b1;
        ack_q     <= ctrl_s2[0];
      end
      if (rd_low) begin
        nib_q <= low_nib_q;
        low_q <= 1'b0;
        ack_q <= ctrl_s2[0];
      end
    end
  end

endmodule
