// rsa_mm2me32: 1-bit to 32-bit shift register (MM2ME32).
//
// Collects the exponentiation result, presented as a bit stream least
// significant bit first, into 32-bit packets.  Each `shift` clock takes
// one bit; after 32 bits `word_valid` pulses with the packet on `word`
// (first bit received in word[0]).  `pad_zero` flushes a partly filled
// packet, filling the missing high bits with zeros.
// The 1-bit to 32-bit shift register follows the published MM2ME32 block;
// its handshake is this design's own.
module rsa_mm2me32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        shift,
  input  logic        bit_in,
  input  logic        pad_zero,
  output logic [31:0] word,
  output logic        word_valid
);
  logic [31:0] sr;
  logic [5:0]  count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; count <= '0; word <= '0; word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (shift) begin
        if (count == 6'd31) begin
          word       <= {bit_in, sr[31:1]};
          word_valid <= 1'b1;
          count      <= '0;
          sr         <= '0;
        end else begin
          sr    <= {bit_in, sr[31:1]};
          count <= count + 6'd1;
        end
      end else if (pad_zero && count != 6'd0) begin
        word       <= sr >> (6'd32 - count);
        word_valid <= 1'b1;
        count      <= '0;
        sr         <= '0;
      end
    end
  end
endmodule
