// vision_top: FPGA side of a PC-FPGA platform for developing real-time
// vision algorithms. The PC grabs camera frames, compresses them and sends
// them over the parallel port; the FPGA decompresses each frame, runs the
// image processing algorithm under test, compresses the result and returns
// it to the PC for display next to the original.
//
// Chain (all stages are valid/ready streams, so a slow PC simply stalls the
// pipeline):
//   pp_if -> huff_dec -> img_dec -> image_proc -> img_enc -> huff_enc -> pp_if
// Bytes from the PC are Huffman-decoded into Y/U/V prediction differences,
// restored to RGB pixels, processed (Sobel, SUSAN edge or SUSAN corner,
// chosen by mode at frame boundaries), converted back to Y/U/V differences,
// Huffman-coded and queued for the PC. The six modules and their order
// follow the system description; the stream protocol between them is this
// design's choice.
//
// Ports: parallel port lines (see pp_if), mode (see image_proc) and
// dec_err, which pulses when the incoming stream holds a bit pattern that is
// no code word, and frame_sent, which pulses when the last byte of a
// processed frame has been handed to the port. Frame size WIDTH x HEIGHT is fixed by parameters.
module vision_top
  import vision_pkg::*;
#(
  parameter int unsigned WIDTH  = 320,
  parameter int unsigned HEIGHT = 240
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] mode,
  input  logic [7:0] pp_data,
  input  logic [1:0] pp_ctrl,
  output logic [4:0] pp_status,
  output logic       dec_err,
  output logic       frame_sent
);
  logic             rx_valid, rx_ready;
  logic [7:0]       rx_data;
  logic             tx_valid, tx_ready;
  logic [7:0]       tx_data;
  logic             ds_valid, ds_ready;
  logic [SYM_W-1:0] ds_sym;
  logic [1:0]       ds_ch;
  logic             dp_valid, dp_ready;
  rgb_t             dp_rgb;
  logic             pr_valid, pr_ready;
  rgb_t             pr_rgb;
  logic             es_valid, es_ready;
  logic [SYM_W-1:0] es_sym;
  logic [1:0]       es_ch;

  pp_if u_pp (
    .clk, .rst_n, .pp_data, .pp_ctrl, .pp_status,
    .rx_valid, .rx_ready, .rx_data, .tx_valid, .tx_ready, .tx_data);

  huff_dec #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_hdec (
    .clk, .rst_n, .in_valid(rx_valid), .in_ready(rx_ready), .in_data(rx_data),
    .out_valid(ds_valid), .out_ready(ds_ready), .out_sym(ds_sym), .out_ch(ds_ch),
    .err(dec_err));

  img_dec #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_idec (
    .clk, .rst_n, .in_valid(ds_valid), .in_ready(ds_ready), .in_sym(ds_sym),
    .in_ch(ds_ch), .out_valid(dp_valid), .out_ready(dp_ready), .out_rgb(dp_rgb));

  image_proc #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_proc (
    .clk, .rst_n, .mode, .in_valid(dp_valid), .in_ready(dp_ready), .in_rgb(dp_rgb),
    .out_valid(pr_valid), .out_ready(pr_ready), .out_rgb(pr_rgb));

  img_enc #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_ienc (
    .clk, .rst_n, .in_valid(pr_valid), .in_ready(pr_ready), .in_rgb(pr_rgb),
    .out_valid(es_valid), .out_ready(es_ready), .out_sym(es_sym), .out_ch(es_ch));

  huff_enc #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_henc (
    .clk, .rst_n, .in_valid(es_valid), .in_ready(es_ready), .in_sym(es_sym),
    .in_ch(es_ch), .out_valid(tx_valid), .out_ready(tx_ready), .out_data(tx_data),
    .frame_done(frame_sent));

endmodule
