// lzss_fifo: synchronous FIFO for LZSS codewords between the Huffman
// decoder and the expander.  DEPTH entries of W bits; write and read may
// happen in the same clock; rd_data shows the oldest entry while !empty.
// This FIFO is this design's own; assertions flag a write when full and a
// read when empty.
// The assertions are switched off while rst_n is low, since registers hold
// no defined value before the first reset clock; lint notes rst_n being
// used both as an asynchronous reset and in these clocked checks.
module lzss_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign empty   = (wp == rp);
  assign full    = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign rd_data = mem[rp[AW-1:0]];
  assign count   = wp - rp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0;
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (clear) begin
      wp <= '0; rp <= '0;
    end else begin
      if (wr_en && !full) begin
        mem[wp[AW-1:0]] <= wr_data;
        wp <= wp + 1'b1;
      end
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end

  // a write into a full FIFO or a read from an empty one is a protocol error
  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
