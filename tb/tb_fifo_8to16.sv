// tb_fifo_8to16: self-checking test of the 8-bit-in / 16-bit-out FIFO.
// A small FIFO (32 bytes) gets random pushes and pops; a byte queue is the
// reference, and each output word must be {second byte, first byte}.
// Checked: data and order, in_ready exactly when a byte is free, out_valid
// exactly when two bytes are stored, the level, and that the FIFO both fills
// and holds a lone byte (half a word, not yet readable) at some point.
module tb_fifo_8to16;
  localparam int unsigned DEPTH = 32;

  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [7:0]  in_data = '0;
  logic [15:0] out_data;
  logic [$clog2(DEPTH):0] level;

  int checks = 0, failures = 0, fulls = 0, halves = 0;
  byte unsigned model[$];

  fifo_8to16 #(.DEPTH_BYTES(DEPTH)) dut (.*);

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
      int unsigned wp = ((i / 500) % 2 == 0) ? 90 : 40;
      @(negedge clk);
      in_valid  = ($urandom_range(99) < wp);
      in_data   = 8'($urandom);
      out_ready = ($urandom_range(99) < (100 - wp + 20));
      #1;
      check(in_ready == (model.size() < DEPTH), "in_ready");
      check(out_valid == (model.size() >= 2), "out_valid");
      check(level == ($clog2(DEPTH)+1)'(model.size()), "level");
      if (model.size() == DEPTH) fulls++;
      if (model.size() == 1) halves++;
      if (out_valid) check(out_data == {model[1], model[0]}, "out_data");
      @(posedge clk);
      if (out_valid && out_ready) begin
        void'(model.pop_front());
        void'(model.pop_front());
      end
      if (in_valid && in_ready) model.push_back(in_data);
    end
    check(fulls > 0, "full reached");
    check(halves > 0, "half word held");
    $display("full cycles=%0d half-word cycles=%0d", fulls, halves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
