// tb_fpga_hat_top: end-to-end test of the whole FPGA configuration at its
// default size (512x512 frames, 4096-byte FIFOs), with the host side played
// by this testbench.
//
// Host schedule, per frame of 131072 words in chunks of 1024 words:
//   write chunk 0; then for each k: write chunk k, read back chunk k-1.
// Frame 1 follows frame 0 directly with no extra cycles: the filter pays out
// the last outputs of frame 0 while it takes the first pixels of frame 1.
// After the final write the host gives idle strobe cycles (neither WE nor
// RE) to let the filter finish, then reads the last chunk. Every returned pixel is compared with an edge map computed
// here from the Prewitt kernels (border 0, |Gx|+|Gy| clipped to 255).
//
// Mechanisms counted, each must occur: write cycles, read cycles, idle
// cycles, pixels filtered during write cycles and during read cycles,
// write/read turnarounds, frame ends, a frame's last outputs paid out
// during the next frame and while idle. The overrun and underrun
// flags must stay clear. Bus timing: 40 ns strobe period (25 M words/s,
// i.e. 50 MB/s), falling edge first, data changed 3 ns after it.
module tb_fpga_hat_top;
  import hat_pkg::*;
  localparam int unsigned W = DEF_IMG_W, H = DEF_IMG_H, NPIX = W * H;
  localparam int unsigned NWORDS = NPIX / 2, CHUNK = 1024, NCHUNK = NWORDS / CHUNK;
  localparam int unsigned FRAMES = 2;

  logic strobe = 1'b1, rst_n = 1'b1, we = 1'b0, re = 1'b0;
  logic [15:0] data_in = '0, data_out;
  logic data_oe, rx_overrun, tx_underrun;

  fpga_hat_top dut (.*);

  int checks = 0, failures = 0, fails_shown = 0;
  longint n_write = 0, n_read = 0, n_idle = 0, px_in_write = 0, px_in_read = 0,
          px_in_idle = 0, turnarounds = 0, flushes = 0, overlap_drains = 0,
          idle_drains = 0;

  byte unsigned img [FRAMES][NPIX];
  byte unsigned edge_ref [FRAMES][NPIX];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (fails_shown < 20) $display("FAIL %s at %0t", what, $time);
      fails_shown++;
    end
  endtask

  function automatic int px(int f, int r, int c);
    return int'(img[f][r * W + c]);
  endfunction

  task automatic make_frame(input int f);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v;
        if (f == 0) v = (r + c + int'($urandom_range(40))) % 256;        // noisy ramp
        else begin                                                       // disc on noise
          int dr = r - H / 2, dc = c - W / 2;
          v = (dr * dr + dc * dc < (W / 4) * (W / 4)) ? 220 : 30;
          v = v + int'($urandom_range(15));
        end
        img[f][r * W + c] = 8'(v);
      end
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int gx, gy, m;
        m = 0;
        if (!(r == 0 || r == H - 1 || c == 0 || c == W - 1)) begin
          gx = (px(f,r-1,c+1) + px(f,r,c+1) + px(f,r+1,c+1)) -
               (px(f,r-1,c-1) + px(f,r,c-1) + px(f,r+1,c-1));
          gy = (px(f,r+1,c-1) + px(f,r+1,c) + px(f,r+1,c+1)) -
               (px(f,r-1,c-1) + px(f,r-1,c) + px(f,r-1,c+1));
          m  = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
          if (m > 255) m = 255;
        end
        edge_ref[f][r * W + c] = 8'(m);
      end
  endtask

  // Mechanism counters, sampled at each rising strobe edge.
  always @(posedge strobe) begin
    if (rst_n) begin
      if (dut.u_prewitt.accept) begin
        if (we) px_in_write++;
        else if (re) px_in_read++;
        else px_in_idle++;
      end
      if (dut.u_prewitt.accept && dut.u_prewitt.last_pix) flushes++;
      if (dut.u_prewitt.accept && !dut.u_prewitt.produce && dut.u_prewitt.owed != 0)
        overlap_drains++;
      if (dut.u_prewitt.idle_drain) idle_drains++;
    end
  end

  logic last_we = 1'b0;
  logic seen_rw = 1'b0;
  task automatic bus_cycle(input bit w, input bit r, input logic [15:0] d,
                           output logic [15:0] q);
    if (w || r) begin
      if (seen_rw && w != last_we) turnarounds++;
      last_we = w;
      seen_rw = 1'b1;
    end
    if (w) n_write++;
    else if (r) n_read++;
    else n_idle++;
    we = w;
    re = r;
    #5 strobe = 1'b0;
    #3 if (w) data_in = d;
    #12;
    q = data_out;
    strobe = 1'b1;
    #20;
  endtask

  task automatic write_chunk(input int f, input int k);
    logic [15:0] q;
    for (int i = 0; i < CHUNK; i++) begin
      int p = 2 * (k * CHUNK + i);
      bus_cycle(1'b1, 1'b0, {img[f][p + 1], img[f][p]}, q);
    end
  endtask

  task automatic read_chunk(input int f, input int k);
    logic [15:0] q;
    for (int i = 0; i < CHUNK; i++) begin
      int p = 2 * (k * CHUNK + i);
      bus_cycle(1'b0, 1'b1, 16'h0, q);
      check(q[7:0] == edge_ref[f][p],
            $sformatf("frame %0d pixel %0d got %0d exp %0d", f, p, q[7:0], edge_ref[f][p]));
      check(q[15:8] == edge_ref[f][p + 1],
            $sformatf("frame %0d pixel %0d got %0d exp %0d", f, p + 1, q[15:8], edge_ref[f][p + 1]));
    end
  endtask

  initial begin
    #(64'd40 * 64'd2000000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q;
    int pf, pk;   // frame and chunk still to be read back
    for (int f = 0; f < FRAMES; f++) make_frame(f);
    #1 rst_n = 1'b0;
    #29 rst_n = 1'b1;
    #10;
    pf = -1;
    pk = 0;
    for (int f = 0; f < FRAMES; f++)
      for (int k = 0; k < NCHUNK; k++) begin
        write_chunk(f, k);
        if (pf >= 0) read_chunk(pf, pk);
        pf = f;
        pk = k;
      end
    // let the filter finish the last chunk and flush the frame
    repeat (2 * CHUNK + W + 8) bus_cycle(1'b0, 1'b0, 16'h0, q);
    read_chunk(pf, pk);
    check(!rx_overrun, "no receive overrun");
    check(!tx_underrun, "no transmit underrun");
    check(n_write > 0 && n_read > 0 && n_idle > 0, "write, read and idle cycles");
    check(px_in_write > 0, "pixels filtered during write cycles");
    check(px_in_read > 0, "pixels filtered during read cycles");
    check(turnarounds > 0, "write/read turnarounds");
    check(flushes == FRAMES, "frame end seen per frame");
    check(overlap_drains > 0, "last outputs of a frame paid during the next");
    check(idle_drains > 0, "last outputs of the stream paid while idle");
    $display("writes=%0d reads=%0d idle=%0d", n_write, n_read, n_idle);
    $display("pixels filtered: in write cycles=%0d in read cycles=%0d in idle cycles=%0d",
             px_in_write, px_in_read, px_in_idle);
    $display("turnarounds=%0d frame ends=%0d overlap drains=%0d idle drains=%0d",
             turnarounds, flushes, overlap_drains, idle_drains);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
