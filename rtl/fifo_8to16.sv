// fifo_8to16: transmit buffer between the edge detector and the host bus.
//
// It takes one filtered byte per clock and gives the bus interface 16-bit
// words, two pixels per host read. Storage is DEPTH_BYTES bytes (4096 in the
// published design), kept as two byte-wide RAMs of DEPTH_BYTES/2 entries: the
// even (earlier) byte of a word in the low lane, the odd byte in the high
// lane. The write pointer counts bytes, the read pointer counts words.
//
// Interface: a byte is written when in_valid && in_ready at a rising clock
// edge; in_ready means at least one byte is free. The output is show-ahead:
// out_valid is high once a complete word is stored, out_data is that word,
// and it is removed when out_ready is also high at a rising edge. One clock
// (the host strobe) for both sides. Level gives the fill in bytes.
module fifo_8to16
  import hat_pkg::*;
#(
  parameter int unsigned DEPTH_BYTES = DEF_FIFO_BYTES
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [7:0]                   in_data,
  output logic                         in_ready,
  output logic                         out_valid,
  output logic [15:0]                  out_data,
  input  logic                         out_ready,
  output logic [$clog2(DEPTH_BYTES):0] level
);

  localparam int unsigned AW    = $clog2(DEPTH_BYTES);
  localparam int unsigned WORDS = DEPTH_BYTES / 2;

  logic [7:0]    mem_lo [WORDS];
  logic [7:0]    mem_hi [WORDS];
  logic [AW:0]   wr_byte;   // byte pointer with wrap bit
  logic [AW-1:0] rd_word;   // word pointer with wrap bit
  logic          push, pop;

  assign level     = wr_byte - {rd_word, 1'b0};
  assign in_ready  = level < (AW+1)'(DEPTH_BYTES);
  assign out_valid = level >= (AW+1)'(2);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = {mem_hi[rd_word[AW-2:0]], mem_lo[rd_word[AW-2:0]]};

  always_ff @(posedge clk) begin
    if (push && !wr_byte[0]) mem_lo[wr_byte[AW-1:1]] <= in_data;
    if (push &&  wr_byte[0]) mem_hi[wr_byte[AW-1:1]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_byte <= '0;
      rd_word <= '0;
    end else begin
      if (push) wr_byte <= wr_byte + 1'b1;
      if (pop)  rd_word <= rd_word + 1'b1;
    end
  end

  a_level_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                  level <= (AW+1)'(DEPTH_BYTES));

endmodule
