// prewitt_filter: streaming 3x3 Prewitt edge detector for 8-bit greyscale
// frames of IMG_W x IMG_H pixels, delivered in raster order, one pixel per
// clock at most.
//
// Two line buffers hold the previous two rows. Each accepted pixel reads the
// column above it from them, forming a new 3-pixel column that is shifted
// into a 3x3 window. The window is centred one row up and one column left of
// the newest pixel, so output pixel j leaves when input pixel j+IMG_W+1
// arrives. From the window:
//   Gx = (right column sum) - (left column sum)
//   Gy = (bottom row sum)   - (top row sum)
//   out = min(|Gx| + |Gy|, 255)
// Pixels on the frame border (first and last row, first and last column)
// are output as 0.
//
// Frame end: when the last pixel of a frame is taken, IMG_W+1 outputs are
// still owed, all on the border and so all zero. They are paid out one per
// clock while the first IMG_W+1 pixels of the next frame come in (those
// produce no output of their own), so back-to-back frames cost exactly one
// clock per pixel. When no input is offered, an owed zero is emitted anyway,
// which drains the last frame of a stream without any extra input. Every
// frame gives exactly IMG_W*IMG_H outputs in raster order.
//
// Interface: valid/ready on both sides, one clock (the host strobe in this
// system). The result is registered: out_valid/out_data change only at a
// rising edge, and the block takes a new pixel whenever its output register
// is empty or being read. Needs IMG_W >= 3 and IMG_H >= 3.
//
// The Prewitt operator, the 8-bit pixels, the 512x512 frame and the rate of
// one pixel per bus cycle are the published design's. The magnitude
// formula, the saturation, the border rule and the latency are this
// design's own choices.
module prewitt_filter
  import hat_pkg::*;
#(
  parameter int unsigned IMG_W = DEF_IMG_W,
  parameter int unsigned IMG_H = DEF_IMG_H
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  output logic       out_valid,
  output logic [7:0] out_data,
  input  logic       out_ready
);

  localparam int unsigned CW = $clog2(IMG_W);
  localparam int unsigned RW = $clog2(IMG_H);
  localparam int unsigned FW = $clog2(IMG_W + 2);

  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic [FW-1:0] owed;     // zero outputs still owed to the previous frame

  pix_t lb_up1 [IMG_W];    // row above the incoming one
  pix_t lb_up2 [IMG_W];    // two rows above

  // window: [row][column], row 0 = top, column 0 = left
  pix_t win [3][3];

  logic advance, accept, last_pix, produce, on_border, idle_drain;
  pix_t nt, nm, nb;        // new column: top, middle, bottom
  grad_t gx, gy;
  logic [GRAD_W:0] mag;
  pix_t  mag_sat;

  assign advance  = !out_valid || out_ready;
  assign in_ready = advance;
  assign accept   = in_valid && in_ready;
  assign last_pix = (col == CW'(IMG_W - 1)) && (row == RW'(IMG_H - 1));
  // No pixel offered: pay out an owed zero on its own.
  assign idle_drain = advance && !in_valid && (owed != '0);

  assign nt = lb_up2[col];
  assign nm = lb_up1[col];
  assign nb = in_data;

  // Gradients over the window as it will be after the shift:
  // left column = win[*][1], middle = win[*][2], right = new column.
  always_comb begin
    grad_t left_sum, right_sum, top_sum, bot_sum;
    left_sum  = grad_t'(win[0][1]) + grad_t'(win[1][1]) + grad_t'(win[2][1]);
    right_sum = grad_t'(nt)        + grad_t'(nm)        + grad_t'(nb);
    top_sum   = grad_t'(win[0][1]) + grad_t'(win[0][2]) + grad_t'(nt);
    bot_sum   = grad_t'(win[2][1]) + grad_t'(win[2][2]) + grad_t'(nb);
    gx        = right_sum - left_sum;
    gy        = bot_sum - top_sum;
    mag       = {1'b0, (gx < 0) ? -gx : gx} + {1'b0, (gy < 0) ? -gy : gy};
    mag_sat   = (mag > (GRAD_W+1)'(255)) ? 8'hFF : mag[7:0];
  end

  // Output index = input index - (IMG_W+1); it exists from row 1, column 1.
  assign produce   = (row >= RW'(2)) || (row == RW'(1) && col != '0);
  // Centre is on the border when it is in column 0 or IMG_W-1 (input column
  // 1 or 0) or in row 0 (input row 1).
  assign on_border = (col <= CW'(1)) || (row == RW'(1));

  always_ff @(posedge clk) begin
    if (accept) begin
      lb_up2[col] <= lb_up1[col];
      lb_up1[col] <= in_data;
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= nt;
      win[1][2] <= nm;
      win[2][2] <= nb;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      owed      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (advance) out_valid <= 1'b0;
      if (accept) begin
        if (produce) begin
          out_valid <= 1'b1;
          out_data  <= on_border ? 8'h00 : mag_sat;
        end else if (owed != '0) begin
          out_valid <= 1'b1;
          out_data  <= 8'h00;
          owed      <= owed - 1'b1;
        end
        if (last_pix) begin
          col  <= '0;
          row  <= '0;
          owed <= FW'(IMG_W + 1);
        end else if (col == CW'(IMG_W - 1)) begin
          col <= '0;
          row <= row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end else if (idle_drain) begin
        out_valid <= 1'b1;
        out_data  <= 8'h00;
        owed      <= owed - 1'b1;
      end
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
