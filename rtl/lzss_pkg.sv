// lzss_pkg: sizes, codeword type and the fixed prefix code shared by the
// LZSS compression and decompression units.
//
// A codeword is either a literal (one symbol) or a match (length, offset):
// "repeat `len` symbols starting `off` symbols back".  The fixed code,
// sent most significant bit first:
//   literal            0 + symbol                      (1 + SW bits)
//   match              1 + length code + (off-1)       (OW bits of offset)
//   length code        2 -> 00, 3 -> 01, 4 -> 100, 5 -> 101,
//                      6..MAXLEN -> 11 + 4-bit (len-6)
// Short matches, the most frequent ones, get the shortest codes.  The code
// itself is this design's choice.
package lzss_pkg;
  localparam int unsigned SW     = 16;    // symbol width
  localparam int unsigned WIN    = 256;   // dictionary (window) size in symbols
  localparam int unsigned OW     = 8;     // offset field, log2(WIN)
  localparam int unsigned MAXLEN = 16;    // longest match (<= 21 for the length code)
  localparam int unsigned LW     = 5;     // length field width

  typedef struct packed {
    logic          is_match;
    logic [SW-1:0] lit;
    logic [LW-1:0] len;
    logic [OW:0]   off;     // 1..WIN
    logic          last;    // final codeword of the stream
  } cw_t;
endpackage
