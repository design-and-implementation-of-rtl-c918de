// lzss_huff_enc: fixed Huffman (prefix) coder.  Re-encodes one LZSS
// codeword into the variable-length code of lzss_pkg, returned
// right-aligned in `code` with its length in `nbits`.  Combinational.
// A fixed Huffman stage follows the published core; the code table itself
// is this design's own (the published one is not given).
module lzss_huff_enc
  import lzss_pkg::*;
(
  input  cw_t         cw,
  output logic [31:0] code,
  output logic [5:0]  nbits
);
  logic [5:0] lc;      // length-code bits
  logic [5:0] lcode;   // length code, right-aligned
  always_comb begin
    case (cw.len)
      LW'(2): begin lcode = 6'b00;  lc = 6'd2; end
      LW'(3): begin lcode = 6'b01;  lc = 6'd2; end
      LW'(4): begin lcode = 6'b100; lc = 6'd3; end
      LW'(5): begin lcode = 6'b101; lc = 6'd3; end
      default: begin lcode = 6'b110000 | 6'(cw.len - LW'(6)); lc = 6'd6; end
    endcase
    if (!cw.is_match) begin
      code  = 32'({1'b0, cw.lit});
      nbits = 6'(1 + SW);
    end else begin
      // 1, length code, offset-1
      code  = (32'(1) << (lc + 6'(OW))) | (32'(lcode) << OW) | 32'(OW'(cw.off - 1'b1));
      nbits = 6'(1) + lc + 6'(OW);
    end
  end
endmodule
