// lzss_unpacker: data unpacker.  Takes 32-bit packets into a bit buffer
// and shows the Huffman decoder the next 32 unread bits (`peek`, first bit
// in peek[31]) together with how many bits are actually buffered
// (`avail`).  The decoder answers in the same clock with the number of bits
// its codeword used (`consume`), which the unpacker drops on the clock
// edge: this is the decoder-to-unpacker feedback path.  A packet is
// accepted (in_ready) whenever at most 32 bits are buffered.
// The buffer size and handshake are this design's own.
module lzss_unpacker (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        in_valid,
  input  logic [31:0] in_word,
  output logic        in_ready,
  output logic [31:0] peek,
  output logic [6:0]  avail,
  input  logic [5:0]  consume
);
  logic [63:0] bbuf;
  logic [6:0]  cnt, left;

  assign in_ready = (cnt <= 7'd32);
  assign avail    = cnt;
  always_comb begin
    peek = (cnt >= 7'd32) ? 32'(bbuf >> (cnt - 7'd32)) : 32'(bbuf << (7'd32 - cnt));
    left = cnt - 7'(consume);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bbuf <= '0; cnt <= '0;
    end else if (start) begin
      cnt <= '0;
    end else if (in_valid && in_ready) begin
      bbuf <= {bbuf[31:0], in_word};
      cnt  <= left + 7'd32;
    end else begin
      cnt <= left;
    end
  end
endmodule
