// fpga_hat_top: FPGA configuration of the Raspberry Pi co-processor HAT.
//
// The host streams greyscale frames over a 16-bit strobed parallel bus and
// reads back their Prewitt edge maps. Data path:
//
//   bus --16--> gpio16_if --16--> fifo_16to8 --8--> prewitt_filter
//                                                      |
//   bus <--16-- gpio16_if <--16-- fifo_8to16 <--8------+
//
// The host strobe is the only clock: every strobe cycle, whether a write, a
// read or an idle cycle with neither enable, moves one bus word and lets the
// filter process one pixel. A word carries two pixels, so while the host
// writes, the input FIFO fills at two pixels per cycle and drains at one;
// while it reads, the output FIFO drains at two and fills at one. Half of a
// frame is thus filtered during write cycles and half during read cycles.
// The host must keep the two FIFOs within their 4096 bytes: the bus has no
// flow control, and rx_overrun / tx_underrun record a violation.
//
// Ports: strobe, we, re and data_in are the bus lines as inputs; data_out
// with data_oe is the pad driver for the shared data lines (the
// bidirectional pad itself belongs to the FPGA I/O cell). rst_n is the
// board's reset push button, asynchronous and active low.
//
// The structure (interface, two FIFOs of 4096 bytes with 16/8-bit sides,
// Prewitt filter between them) follows the published design; clocking the
// whole chain from the strobe is this design's reading of it.
module fpga_hat_top
  import hat_pkg::*;
#(
  parameter int unsigned IMG_W      = DEF_IMG_W,
  parameter int unsigned IMG_H      = DEF_IMG_H,
  parameter int unsigned FIFO_BYTES = DEF_FIFO_BYTES
) (
  input  logic              strobe,
  input  logic              rst_n,
  input  logic              we,
  input  logic              re,
  input  logic [BUS_W-1:0]  data_in,
  output logic [BUS_W-1:0]  data_out,
  output logic              data_oe,
  output logic              rx_overrun,
  output logic              tx_underrun
);

  logic             rx_valid, rx_ready;
  logic [BUS_W-1:0] rx_data;
  logic             tx_valid, tx_pop;
  logic [BUS_W-1:0] tx_data;

  logic             px_in_valid, px_in_ready;
  logic [7:0]       px_in_data;
  logic             px_out_valid, px_out_ready;
  logic [7:0]       px_out_data;


  gpio16_if #(.DATA_W(BUS_W)) u_bus (
    .strobe     (strobe),
    .rst_n      (rst_n),
    .we         (we),
    .re         (re),
    .data_in    (data_in),
    .data_out   (data_out),
    .data_oe    (data_oe),
    .rx_valid   (rx_valid),
    .rx_data    (rx_data),
    .rx_ready   (rx_ready),
    .tx_valid   (tx_valid),
    .tx_data    (tx_data),
    .tx_pop     (tx_pop),
    .rx_overrun (rx_overrun),
    .tx_underrun(tx_underrun)
  );

  fifo_16to8 #(.DEPTH_BYTES(FIFO_BYTES)) u_rx_fifo (
    .clk      (strobe),
    .rst_n    (rst_n),
    .in_valid (rx_valid),
    .in_data  (rx_data),
    .in_ready (rx_ready),
    .out_valid(px_in_valid),
    .out_data (px_in_data),
    .out_ready(px_in_ready),
    .level    ()
  );

  prewitt_filter #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_prewitt (
    .clk      (strobe),
    .rst_n    (rst_n),
    .in_valid (px_in_valid),
    .in_data  (px_in_data),
    .in_ready (px_in_ready),
    .out_valid(px_out_valid),
    .out_data (px_out_data),
    .out_ready(px_out_ready)
  );

  fifo_8to16 #(.DEPTH_BYTES(FIFO_BYTES)) u_tx_fifo (
    .clk      (strobe),
    .rst_n    (rst_n),
    .in_valid (px_out_valid),
    .in_data  (px_out_data),
    .in_ready (px_out_ready),
    .out_valid(tx_valid),
    .out_data (tx_data),
    .out_ready(tx_pop),
    .level    ()
  );

endmodule
