// lzss_huff_dec: fixed Huffman decoder, the inverse of lzss_huff_enc.
// Combinational.  From the unpacker's 32-bit look-ahead it works out the
// codeword and its length in bits; when that many bits are buffered and
// the codeword FIFO has room it presents cw_valid and reports the bits
// used on `consume` (zero otherwise).  One codeword per clock.
// The code table is this design's own, mirroring lzss_huff_enc.  The
// stream carries no end marker, so cw.last is always 0 here; the expander
// stops on its symbol count instead.
module lzss_huff_dec
  import lzss_pkg::*;
(
  input  logic [31:0] peek,
  input  logic [6:0]  avail,
  input  logic        enable,     // FIFO has room and decoding is on
  output logic        cw_valid,
  output cw_t         cw,
  output logic [5:0]  consume
);
  logic [5:0] need, lc;
  logic [LW-1:0] len;
  always_comb begin
    cw = '0;
    lc = 6'd2;
    len = LW'(2);
    if (!peek[31]) begin
      need = 6'(1 + SW);
      cw.lit = peek[30 -: SW];
    end else begin
      case (peek[30:29])
        2'b00: begin len = LW'(2); lc = 6'd2; end
        2'b01: begin len = LW'(3); lc = 6'd2; end
        2'b10: begin len = peek[28] ? LW'(5) : LW'(4); lc = 6'd3; end
        default: begin len = LW'(6) + LW'(peek[28:25]); lc = 6'd6; end
      endcase
      need = 6'd1 + lc + 6'(OW);
      cw.is_match = 1'b1;
      cw.len = len;
      cw.off = (OW+1)'(OW'(peek >> (6'd31 - lc - 6'(OW)))) + 1'b1;
    end
    cw_valid = enable && (avail >= 7'(need));
    consume  = cw_valid ? need : 6'd0;
  end
endmodule
