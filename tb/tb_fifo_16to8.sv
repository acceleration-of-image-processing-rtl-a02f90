// tb_fifo_16to8: self-checking test of the 16-bit-in / 8-bit-out FIFO.
// A small FIFO (32 bytes) is driven with random pushes and pops; a queue of
// bytes (low byte of each word first) is the reference. Checked: every byte
// and its order, in_ready exactly when two bytes are free, out_valid exactly
// when a byte is stored, the level output, and that the FIFO fills and
// empties at least once.
module tb_fifo_16to8;
  localparam int unsigned DEPTH = 32;

  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [15:0] in_data = '0;
  logic [7:0]  out_data;
  logic [$clog2(DEPTH):0] level;

  int checks = 0, failures = 0, fulls = 0, empties = 0;
  byte unsigned model[$];

  fifo_16to8 #(.DEPTH_BYTES(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      // fill-biased, then drain-biased phases so both ends are reached
      int unsigned wp = ((i / 500) % 2 == 0) ? 80 : 30;
      @(negedge clk);
      in_valid  = ($urandom_range(99) < wp);
      in_data   = 16'($urandom);
      out_ready = ($urandom_range(99) < (100 - wp + 10));
      #1;
      check(in_ready == (model.size() <= DEPTH - 2), "in_ready");
      check(out_valid == (model.size() != 0), "out_valid");
      check(level == ($clog2(DEPTH)+1)'(model.size()), "level");
      if (model.size() > DEPTH - 2) fulls++;
      if (model.size() == 0) empties++;
      if (out_valid) check(out_data == model[0], "out_data");
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) begin
        model.push_back(in_data[7:0]);
        model.push_back(in_data[15:8]);
      end
    end
    check(fulls > 0, "full reached");
    check(empties > 0, "empty reached");
    $display("full cycles=%0d empty cycles=%0d", fulls, empties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
