// lzss_avalon: 32-bit bus slave holding the LZSS compression and
// decompression units, with a 64-entry FIFO on each output.
//   0  write: symbol to compress, bits 15:0; bit16 marks the last symbol
//   1  write: bit0 start a compression (clears the unit and its FIFO),
//            bit1 start a decompression of `n_symbols` symbols
//   2  read : next compressed 32-bit packet (the read pops the FIFO)
//   3  write: next compressed packet to decompress (only when status bit2)
//   4  write: n_symbols for the next decompression
//   5  read : next decompressed symbol, bits 15:0 (the read pops the FIFO)
//   6  read : status: bit0 last packet produced, bit1 decompression done,
//            bit2 decompressor accepts a packet, bits 14:8 packets waiting,
//            bits 22:16 symbols waiting
// readdata is combinational; a read of 2 or 5 must last one clock.  The
// host has to drain the packet FIFO while it compresses; the
// decompressor stops by itself when its symbol FIFO is nearly full.
// The register map and the two 64-entry output FIFOs are this design's own.
// The assertions are switched off while rst_n is low, since registers hold
// no defined value before the first reset clock; lint notes rst_n being
// used both as an asynchronous reset and in these clocked checks.
module lzss_avalon
  import lzss_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        chipselect,
  input  logic        write,
  input  logic        read,
  input  logic [2:0]  address,
  input  logic [31:0] writedata,
  output logic [31:0] readdata,
  output logic        irq
);
  localparam int unsigned DEPTH = 64;
  wire wr = chipselect && write;
  wire rd = chipselect && read;

  logic        c_valid, c_last, c_seen_last;
  logic [31:0] c_word, cf_data;
  logic        cf_empty, cf_full;
  logic [6:0]  cf_count;
  logic [31:0] n_symbols;
  logic        d_ready, d_valid, d_done;
  logic [SW-1:0] d_sym, df_data;
  logic        df_empty, df_full;
  logic [6:0]  df_count;

  wire start_c = wr && address == 3'd1 && writedata[0];
  wire start_d = wr && address == 3'd1 && writedata[1];

  lzss_compressor u_comp (.clk, .rst_n, .start(start_c), .in_valid(wr && address == 3'd0),
    .in_sym(writedata[SW-1:0]), .in_last(writedata[16]), .out_valid(c_valid), .out_word(c_word),
    .out_last(c_last));
  lzss_fifo #(.W(32), .DEPTH(DEPTH)) u_cfifo (.clk, .rst_n, .clear(start_c), .wr_en(c_valid),
    .wr_data(c_word), .rd_en(rd && address == 3'd2 && !cf_empty), .rd_data(cf_data),
    .empty(cf_empty), .full(cf_full), .count(cf_count));

  lzss_decompressor u_decomp (.clk, .rst_n, .start(start_d), .n_symbols,
    .in_valid(wr && address == 3'd3), .in_word(writedata), .in_ready(d_ready),
    .out_ready(df_count <= 7'(DEPTH - 2)), .out_valid(d_valid), .out_sym(d_sym), .done(d_done));
  lzss_fifo #(.W(SW), .DEPTH(DEPTH)) u_dfifo (.clk, .rst_n, .clear(start_d), .wr_en(d_valid),
    .wr_data(d_sym), .rd_en(rd && address == 3'd5 && !df_empty), .rd_data(df_data),
    .empty(df_empty), .full(df_full), .count(df_count));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_symbols <= '0; c_seen_last <= 1'b0;
    end else begin
      if (wr && address == 3'd4) n_symbols <= writedata;
      if (start_c) c_seen_last <= 1'b0;
      else if (c_valid && c_last) c_seen_last <= 1'b1;
    end
  end

  always_comb begin
    readdata = '0;
    if (rd) begin
      case (address)
        3'd2: readdata = cf_data;
        3'd5: readdata = 32'(df_data);
        3'd6: readdata = {9'b0, df_count, 1'b0, cf_count, 5'b0, d_ready, d_done, c_seen_last};
        default: readdata = '0;
      endcase
    end
  end
  assign irq = c_seen_last || d_done;

  // the host must not let the packet FIFO overflow
  assert property (@(posedge clk) disable iff (!rst_n) !(c_valid && cf_full));
endmodule
