// lzss_packer: data packer.  Appends the variable-length codes from the
// Huffman coder (most significant bit first) to a bit buffer and emits
// each completed 32-bit packet.  After the code marked `last` the remaining
// bits go out as a final packet padded with zeros, with out_last set.
// At most one packet leaves per clock; a code is at most 32 bits, so the
// packer never stalls its input.
// Packing into fixed 32-bit packets follows the published core; bit order
// and zero padding are this design's choices.
module lzss_packer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        in_valid,
  input  logic [31:0] code,
  input  logic [5:0]  nbits,
  input  logic        in_last,
  output logic        out_valid,
  output logic [31:0] out_word,
  output logic        out_last
);
  logic [63:0] bbuf, nbuf;
  logic [6:0]  cnt, ncnt;
  logic        pend;        // final partial packet still to send

  always_comb begin
    nbuf = bbuf;
    ncnt = cnt;
    if (in_valid) begin
      nbuf = (bbuf << nbits) | 64'(code);
      ncnt = cnt + 7'(nbits);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bbuf <= '0; cnt <= '0; pend <= 1'b0;
      out_valid <= 1'b0; out_word <= '0; out_last <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (start) begin
        cnt <= '0; pend <= 1'b0;
      end else if (pend) begin
        pend      <= 1'b0;
        out_valid <= (cnt != '0);
        out_word  <= 32'(bbuf << (7'd32 - cnt));
        out_last  <= 1'b1;
        cnt       <= '0;
      end else begin
        bbuf <= nbuf;
        if (ncnt >= 7'd32) begin
          out_valid <= 1'b1;
          out_word  <= 32'(nbuf >> (ncnt - 7'd32));
          cnt       <= ncnt - 7'd32;
          if (in_valid && in_last) begin
            if (ncnt == 7'd32) out_last <= 1'b1;
            else pend <= 1'b1;
          end
        end else begin
          cnt <= ncnt;
          if (in_valid && in_last) begin
            out_valid <= 1'b1;
            out_word  <= 32'(nbuf << (7'd32 - ncnt));
            out_last  <= 1'b1;
            cnt       <= '0;
          end
        end
      end
    end
  end
endmodule
