// hat_pkg: constants shared by the FPGA side of the Raspberry Pi / FPGA
// co-processor. The image size (512x512 greyscale), the 16-bit bus width and
// the 4096-byte FIFO size are the figures of the published design; the
// Prewitt arithmetic widths follow from 8-bit pixels.
package hat_pkg;

  // Host bus: 16 data lines, one word (two pixels) per strobe cycle.
  localparam int unsigned BUS_W      = 16;
  localparam int unsigned PIX_W      = 8;

  // Default frame geometry and buffer size.
  localparam int unsigned DEF_IMG_W      = 512;
  localparam int unsigned DEF_IMG_H      = 512;
  localparam int unsigned DEF_FIFO_BYTES = 4096;

  // Prewitt gradient: a difference of two 3-pixel sums, |g| <= 3*255 = 765,
  // so 11 signed bits hold it.
  localparam int unsigned GRAD_W     = 11;
  typedef logic signed [GRAD_W-1:0] grad_t;
  typedef logic [PIX_W-1:0]         pix_t;

endpackage
