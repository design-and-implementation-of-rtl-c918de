// lzss_decompressor: decompression unit of the LZSS processor.
// Data unpacker <-> fixed Huffman decoder (the decoder tells the unpacker
// how many bits each codeword used) -> LZSS codeword FIFO -> LZSS expander.
// Give the number of symbols to rebuild with start, then feed the 32-bit
// packets of the compressed stream (in_valid/in_ready).  The expander emits
// up to one 16-bit symbol per clock while out_ready is high (a low
// out_ready pauses it from the next clock on); done rises after the last
// symbol.
// The unpacker/decoder/expander chain with decoder-to-unpacker feedback is
// this design's reading of the published decompression unit; the FIFO and
// the symbol count input are this design's own.
module lzss_decompressor
  import lzss_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   n_symbols,
  input  logic          in_valid,
  input  logic [31:0]   in_word,
  output logic          in_ready,
  input  logic          out_ready,
  output logic          out_valid,
  output logic [SW-1:0] out_sym,
  output logic          done
);
  logic [31:0] peek;
  logic [6:0]  avail;
  logic [5:0]  consume;
  logic        dec_valid, fifo_full, fifo_empty, fifo_pop;
  cw_t         dec_cw, fifo_cw;
  logic [31:0] n_r;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) n_r <= '0;
    else if (start) n_r <= n_symbols;

  lzss_unpacker u_unpack (.clk, .rst_n, .start, .in_valid, .in_word, .in_ready, .peek, .avail,
                          .consume);
  lzss_huff_dec u_hdec (.peek, .avail, .enable(!fifo_full && !done), .cw_valid(dec_valid),
                        .cw(dec_cw), .consume);
  lzss_fifo #(.W($bits(cw_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clear(start), .wr_en(dec_valid), .wr_data(dec_cw), .rd_en(fifo_pop),
    .rd_data(fifo_cw), .empty(fifo_empty), .full(fifo_full), .count());
  lzss_expander u_exp (.clk, .rst_n, .start, .n_symbols(n_r), .fifo_empty, .fifo_cw, .fifo_pop,
                       .out_ready, .out_valid, .out_sym, .done);
endmodule
