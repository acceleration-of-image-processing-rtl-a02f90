// tb_prewitt_filter: self-checking test of the streaming Prewitt detector on
// small frames (16x6). The reference edge map is computed here from the
// Prewitt kernels directly (border pixels 0, magnitude |Gx|+|Gy| clipped to
// 255) and compared pixel by pixel.
//   Phase 1: two frames back to back at full rate, out_ready always high.
//            in_ready must never drop (the zeros owed at the end of frame 0
//            overlap the start of frame 1), and the span from the first
//            accepted pixel to the last output must be 2*W*H + W + 1 cycles:
//            one pixel per clock, plus W+1 cycles to drain the last frame.
//   Phase 2: three frames with random input gaps and output back-pressure,
//            including strong edges that saturate at 255.
module tb_prewitt_filter;
  localparam int unsigned W = 16, H = 6, N = W * H;

  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [7:0] in_data = '0, out_data;

  int checks = 0, failures = 0, saturated = 0, stalls = 0;
  byte unsigned img [N];
  byte unsigned ref_q[$];

  prewitt_filter #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int px(int r, int c);
    return int'(img[r * W + c]);
  endfunction

  // Fill img with a frame and append its edge map to ref_q.
  task automatic make_frame(input int kind);
    for (int i = 0; i < N; i++) begin
      case (kind)
        0: img[i] = 8'($urandom);
        1: img[i] = ((i % W) < W / 2) ? 8'd0 : 8'd255;          // vertical step
        default: img[i] = ((i / W) % 2 == 0) ? 8'd20 : 8'd200; // row stripes
      endcase
    end
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int gx, gy, m;
        if (r == 0 || r == H - 1 || c == 0 || c == W - 1) m = 0;
        else begin
          gx = (px(r-1,c+1) + px(r,c+1) + px(r+1,c+1)) - (px(r-1,c-1) + px(r,c-1) + px(r+1,c-1));
          gy = (px(r+1,c-1) + px(r+1,c) + px(r+1,c+1)) - (px(r-1,c-1) + px(r-1,c) + px(r-1,c+1));
          m  = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
          if (m > 255) begin
            m = 255;
            saturated++;
          end
        end
        ref_q.push_back(8'(m));
      end
  endtask

  // Output checker.
  int outs = 0, last_out_cycle = 0, cycle = 0;
  int accepts = 0, frame_start = 0, overlap_drains = 0, idle_drains = 0;
  bit full_rate = 1'b0;
  int full_rate_stalls = 0;
  byte unsigned e;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid && in_ready) begin
      if (accepts == 0) frame_start <= cycle;
      accepts++;
    end
    if (rst_n && full_rate && in_valid && !in_ready) full_rate_stalls++;
    if (rst_n && dut.accept && !dut.produce && dut.owed != 0) overlap_drains++;
    if (rst_n && dut.idle_drain) idle_drains++;
    if (rst_n && out_valid && !out_ready) stalls++;
    if (rst_n && out_valid && out_ready) begin
      if (ref_q.size() == 0) check(1'b0, "unexpected output");
      else begin
        e = ref_q.pop_front();
        check(out_data == e, $sformatf("pixel %0d got %0d exp %0d", outs % N, out_data, e));
      end
      outs++;
      last_out_cycle <= cycle;
    end
  end

  task automatic send_frame(input int gap_pct, input int rdy_pct);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      while ($urandom_range(99) < gap_pct) begin
        in_valid = 1'b0;
        out_ready = ($urandom_range(99) < rdy_pct);
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_data  = img[i];
      out_ready = ($urandom_range(99) < rdy_pct);
      @(posedge clk);
      while (!in_ready) begin
        @(negedge clk);
        out_ready = ($urandom_range(99) < rdy_pct);
        @(posedge clk);
      end
    end
  endtask

  task automatic stop_input();
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // Phase 1: two frames back to back at full rate, timing check.
    out_ready = 1'b1;
    full_rate = 1'b1;
    make_frame(0);
    send_frame(0, 100);
    make_frame(1);
    send_frame(0, 100);
    stop_input();
    full_rate = 1'b0;
    while (outs < 2 * N) @(posedge clk);
    @(negedge clk);
    check(full_rate_stalls == 0, $sformatf("input stalled %0d times at full rate", full_rate_stalls));
    check(last_out_cycle - frame_start == 2 * N + W + 1,
          $sformatf("two-frame span %0d cycles, expected %0d", last_out_cycle - frame_start, 2 * N + W + 1));
    // Phase 2: random gaps and back-pressure.
    for (int f = 0; f < 3; f++) begin
      make_frame(f == 1 ? 2 : 0);
      send_frame(30, 60);
    end
    stop_input();
    out_ready = 1'b1;
    while (outs < 5 * N) @(posedge clk);
    repeat (5) @(posedge clk);
    check(outs == 5 * N, "output count");
    check(saturated > 0, "saturation exercised");
    check(stalls > 0, "back-pressure exercised");
    check(overlap_drains > 0, "owed zeros paid during next frame");
    check(idle_drains > 0, "owed zeros paid while idle");
    $display("outputs=%0d saturated=%0d stall cycles=%0d overlap drains=%0d idle drains=%0d",
             outs, saturated, stalls, overlap_drains, idle_drains);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
