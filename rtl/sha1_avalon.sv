// sha1_avalon: 32-bit bus slave around sha1_engine.
//   0     message word (write; 16 writes, M0 first, load one padded block)
//   1     control: bit0 start, bit1 first block (restart from the IV)
//   2     status: bit0 digest ready, bit1 busy
//   8-12  digest H0..H4 (read)
// readdata is combinational (zero wait states).
// The register map and control bits are this design's own.
module sha1_avalon (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        chipselect,
  input  logic        write,
  input  logic        read,
  input  logic [3:0]  address,
  input  logic [31:0] writedata,
  output logic [31:0] readdata,
  output logic        irq
);
  logic         busy, md160_rdy, md_word_rdy;
  logic [159:0] md;
  logic [31:0]  md_word;

  wire wr = chipselect && write;
  sha1_engine u_sha (.clk, .rst_n, .load(wr && address == 4'd0), .mt(writedata),
                     .start(wr && address == 4'd1 && writedata[0]), .first(writedata[1]),
                     .read_next(1'b0), .busy, .md, .md160_rdy, .md_word, .md_word_rdy);

  always_comb begin
    readdata = '0;
    if (chipselect && read) begin
      if (address == 4'd2) readdata = {30'b0, busy, md160_rdy};
      else if (address >= 4'd8 && address <= 4'd12)
        readdata = md[159-32*(32'(address) - 8) -: 32];
    end
  end
  assign irq = md160_rdy;
endmodule
