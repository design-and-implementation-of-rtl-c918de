// lzss_compressor: compression unit of the LZSS processor.
// LZSS coder -> fixed Huffman coder -> data packer, all clocked by one
// clock.  One 16-bit symbol is accepted every clock (no backpressure); the
// output is a stream of 32-bit packets, the last one flagged.
// Latency from a symbol to the packet that completes with its codeword is
// data dependent (a codeword leaves the coder when its phrase ends); the
// packer adds one clock.
// The three-stage structure follows the published compression unit; the
// sizes are this design's choices.
module lzss_compressor
  import lzss_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          in_valid,
  input  logic [SW-1:0] in_sym,
  input  logic          in_last,
  output logic          out_valid,
  output logic [31:0]   out_word,
  output logic          out_last
);
  logic        cw_valid;
  cw_t         cw;
  logic [31:0] code;
  logic [5:0]  nbits;

  lzss_coder u_coder (.clk, .rst_n, .start, .in_valid, .in_sym, .in_last, .cw_valid, .cw);
  lzss_huff_enc u_huff (.cw, .code, .nbits);
  lzss_packer u_pack (.clk, .rst_n, .start, .in_valid(cw_valid), .code, .nbits,
                      .in_last(cw.last), .out_valid, .out_word, .out_last);
endmodule
