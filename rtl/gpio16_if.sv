// gpio16_if: FPGA end of the 16-bit strobed parallel bus to the Raspberry Pi.
//
// The host owns the bus timing. It drives a read-write strobe (idle high), a
// write enable WE and a read enable RE; there is no free-running bus clock.
// Every strobe cycle is a falling edge followed by a rising edge:
//   * write (WE=1): the host changes data at the falling edge, and the FPGA
//     samples data_in at the rising edge. The sampled word is held in a
//     register and offered to the receive FIFO (rx_valid/rx_data), which
//     takes it at the next rising edge.
//   * read (RE=1): at the falling edge the FPGA drives the head word of the
//     transmit FIFO onto data_out; the host samples it at the rising edge,
//     and at that rising edge the FPGA pops the word (tx_pop).
// The strobe is the clock of this block and of everything behind it, so the
// whole FPGA pipeline advances once per host strobe cycle. data_oe turns the
// shared data pins around: the pads drive only while RE is asserted.
//
// Assertions state the host's side of the protocol: WE and RE are never
// asserted together and do not change while the strobe is low.
//
// The edge roles, WE/RE meaning and 16-bit width follow the published
// protocol. The sample register, the pop-on-rising-edge rule and the two
// sticky error flags (a word dropped because the receive FIFO was full, a
// read served while the transmit FIFO was empty) are this design's own
// choices: the protocol has no flow control and simply relies on the FPGA
// always keeping up.
module gpio16_if
  import hat_pkg::*;
#(
  parameter int unsigned DATA_W = BUS_W
) (
  input  logic              strobe,     // host read-write strobe, used as clock
  input  logic              rst_n,      // asynchronous active-low reset
  input  logic              we,         // host write enable
  input  logic              re,         // host read enable
  input  logic [DATA_W-1:0] data_in,    // data lines as seen by the FPGA
  output logic [DATA_W-1:0] data_out,   // value driven on the data lines
  output logic              data_oe,    // 1: FPGA drives the data lines
  // towards the receive FIFO
  output logic              rx_valid,
  output logic [DATA_W-1:0] rx_data,
  input  logic              rx_ready,
  // from the transmit FIFO (show-ahead head word)
  input  logic              tx_valid,
  input  logic [DATA_W-1:0] tx_data,
  output logic              tx_pop,
  // sticky status
  output logic              rx_overrun,
  output logic              tx_underrun
);

  logic launched;  // a word was put on the bus at the last falling edge

  // Write path: sample on the rising edge while WE is asserted.
  always_ff @(posedge strobe or negedge rst_n) begin
    if (!rst_n) begin
      rx_valid   <= 1'b0;
      rx_data    <= '0;
      rx_overrun <= 1'b0;
    end else begin
      rx_valid <= we;
      if (we) rx_data <= data_in;
      // A held word that the FIFO cannot take is overwritten: note it.
      if (rx_valid && !rx_ready) rx_overrun <= 1'b1;
    end
  end

  // Read path: launch on the falling edge while RE is asserted.
  always_ff @(negedge strobe or negedge rst_n) begin
    if (!rst_n) begin
      data_out    <= '0;
      launched    <= 1'b0;
      tx_underrun <= 1'b0;
    end else begin
      launched <= re && tx_valid;
      if (re) begin
        data_out <= tx_data;
        if (!tx_valid) tx_underrun <= 1'b1;
      end
    end
  end

  // The host has taken the launched word by the next rising edge.
  assign tx_pop  = re && launched;
  assign data_oe = re;

  // Bus rules: the host never writes and reads in the same cycle, and keeps
  // WE/RE steady from the falling to the rising strobe edge.
  logic we_at_fall, re_at_fall;
  always_ff @(negedge strobe) begin
    we_at_fall <= we;
    re_at_fall <= re;
  end

  a_we_re_exclusive: assert property (@(posedge strobe) disable iff (!rst_n) !(we && re));
  a_we_stable: assert property (@(posedge strobe) disable iff (!rst_n)
                                $past(rst_n) |-> we == we_at_fall);
  a_re_stable: assert property (@(posedge strobe) disable iff (!rst_n)
                                $past(rst_n) |-> re == re_at_fall);

endmodule
