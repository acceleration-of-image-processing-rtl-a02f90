// fifo_16to8: receive buffer between the host bus and the edge detector.
//
// It takes 16-bit words from the bus interface and hands them on one byte at
// a time, since the filter works on 8-bit pixels. Storage is DEPTH_BYTES
// bytes (4096 in the published design, held in on-chip RAM), organised as
// DEPTH_BYTES/2 words. The write pointer counts words; the read pointer counts
// bytes, and its lowest bit picks the byte of the word. The low byte of a
// word is the earlier pixel (this byte order is a choice of this design).
//
// Interface: a word is written when in_valid && in_ready at a rising clock
// edge; in_ready means at least two bytes are free. The output is
// show-ahead: out_data is the oldest byte whenever out_valid is high, and it
// is removed when out_ready is also high at a rising edge. Both sides share
// one clock (the host strobe). Level gives the fill in bytes.
module fifo_16to8
  import hat_pkg::*;
#(
  parameter int unsigned DEPTH_BYTES = DEF_FIFO_BYTES
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [15:0]                 in_data,
  output logic                        in_ready,
  output logic                        out_valid,
  output logic [7:0]                  out_data,
  input  logic                        out_ready,
  output logic [$clog2(DEPTH_BYTES):0] level
);

  localparam int unsigned AW    = $clog2(DEPTH_BYTES);   // byte address bits
  localparam int unsigned WORDS = DEPTH_BYTES / 2;

  logic [15:0] mem [WORDS];
  logic [AW-1:0] wr_word;   // word pointer with wrap bit (AW-1 address bits + 1)
  logic [AW:0]   rd_byte;   // byte pointer with wrap bit
  logic          push, pop;

  assign level     = {wr_word, 1'b0} - rd_byte;
  assign in_ready  = level <= (AW+1)'(DEPTH_BYTES - 2);
  assign out_valid = level != '0;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  logic [15:0] head_word;
  assign head_word = mem[rd_byte[AW-1:1]];
  assign out_data  = rd_byte[0] ? head_word[15:8] : head_word[7:0];

  always_ff @(posedge clk) begin
    if (push) mem[wr_word[AW-2:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_word <= '0;
      rd_byte <= '0;
    end else begin
      if (push) wr_word <= wr_word + 1'b1;
      if (pop)  rd_byte <= rd_byte + 1'b1;
    end
  end

  a_level_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                  level <= (AW+1)'(DEPTH_BYTES));

endmodule
