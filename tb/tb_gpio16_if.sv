// tb_gpio16_if: self-checking test of the strobed 16-bit bus interface.
// The test plays the host: each bus cycle lowers the strobe, changes the data
// lines shortly after the falling edge, and raises the strobe 20 ns later.
// Behind the interface it models the two FIFOs: a receive side that records
// each word taken (with a ready it can hold low) and a transmit queue with a
// show-ahead head word that is popped on tx_pop.
// Checked: every written word reaches the receive side once and in order;
// every read returns the next queued word, valid at the rising edge; data_oe
// follows RE; write-to-read and read-to-write switches; the overrun flag when
// the receive side refuses a word, and the underrun flag when the host reads
// an empty queue.
module tb_gpio16_if;
  logic strobe = 1'b1, rst_n = 1'b1, we = 1'b0, re = 1'b0;
  logic [15:0] data_in = '0, data_out, rx_data, tx_data = '0;
  logic data_oe, rx_valid, rx_ready = 1'b1, tx_valid = 1'b0, tx_pop;
  logic rx_overrun, tx_underrun;

  int checks = 0, failures = 0, switches = 0;
  logic [15:0] txq[$], rx_got[$], rx_exp[$];

  gpio16_if dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // FIFO models behind the interface.
  always @(posedge strobe) begin
    if (rx_valid && rx_ready) rx_got.push_back(rx_data);
    if (tx_pop) void'(txq.pop_front());
  end
  always @(posedge strobe or txq.size()) begin
    #0;
    tx_valid = txq.size() != 0;
    tx_data  = (txq.size() != 0) ? txq[0] : 16'hDEAD;
  end

  logic last_we = 1'b0;
  task automatic bus_cycle(input bit w, input bit r, input logic [15:0] d,
                           output logic [15:0] q);
    if (w != last_we && (w || r)) switches++;
    if (w || r) last_we = w;
    we = w;
    re = r;
    #5 strobe = 1'b0;
    #3 if (w) data_in = d;
    #12;
    check(data_oe == r, "data_oe follows RE");
    q = data_out;
    strobe = 1'b1;
    #20;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q, w;
    #1 rst_n = 1'b0;
    #29 rst_n = 1'b1;
    #10;
    for (int blk = 0; blk < 6; blk++) begin
      // a burst of writes
      int n = 1 + $urandom_range(20);
      for (int i = 0; i < n; i++) begin
        w = 16'($urandom);
        rx_exp.push_back(w);
        bus_cycle(1'b1, 1'b0, w, q);
      end
      // queue words for the host and read a burst back
      n = 1 + $urandom_range(20);
      for (int i = 0; i < n + 3; i++) txq.push_back(16'($urandom));
      for (int i = 0; i < n; i++) begin
        logic [15:0] e;
        e = txq[0];
        bus_cycle(1'b0, 1'b1, 16'h0, q);
        check(q == e, $sformatf("read word got %h exp %h", q, e));
      end
      txq.delete();
      // one idle strobe cycle
      bus_cycle(1'b0, 1'b0, 16'h0, q);
    end
    check(rx_got.size() == rx_exp.size(), "received word count");
    foreach (rx_exp[i])
      if (i < rx_got.size())
        check(rx_got[i] == rx_exp[i], $sformatf("rx word %0d", i));
    check(!rx_overrun && !tx_underrun, "no error flags in normal traffic");
    // overrun: the receive side refuses two consecutive words
    rx_ready = 1'b0;
    bus_cycle(1'b1, 1'b0, 16'h1234, q);
    bus_cycle(1'b1, 1'b0, 16'h5678, q);
    check(rx_overrun, "overrun flagged");
    rx_ready = 1'b1;
    // underrun: read with nothing queued
    bus_cycle(1'b0, 1'b1, 16'h0, q);
    bus_cycle(1'b0, 1'b1, 16'h0, q);
    check(tx_underrun, "underrun flagged");
    check(switches >= 10, "mode switches exercised");
    $display("mode switches=%0d words in=%0d", switches, rx_got.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
