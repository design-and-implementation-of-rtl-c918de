// lzss_expander: LZSS expander.  Pops codewords from the FIFO and rebuilds
// the symbol stream in a WIN-symbol circular history buffer: a literal is
// output directly, a match copies `len` symbols from `off` positions back,
// one per clock (the copy may overlap the symbols it is producing).  Every
// output symbol is also written to the history.  Output is one symbol per
// clock while codewords are available and out_ready is high (it pauses
// while out_ready is low); the expander stops after n_symbols
// symbols and raises done.
// The history buffer and the out_ready pause are this design's own.
module lzss_expander
  import lzss_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   n_symbols,
  input  logic          fifo_empty,
  input  cw_t           fifo_cw,
  output logic          fifo_pop,
  input  logic          out_ready,    // the consumer can take a symbol next clock
  output logic          out_valid,
  output logic [SW-1:0] out_sym,
  output logic          done
);
  logic [SW-1:0] hist [WIN];
  logic [OW-1:0] wptr;
  logic [OW:0]   off;
  logic [LW-1:0] remaining;
  logic [31:0]   produced;
  logic          active;
  logic [SW-1:0] sym;
  logic          emit;
  logic [OW-1:0] src_c, src_n;

  logic          go;
  assign active = !done && (produced != n_symbols);
  assign go     = active && out_ready;
  always_comb begin
    src_c    = wptr - OW'(off);
    src_n    = wptr - OW'(fifo_cw.off);
    fifo_pop = go && (remaining == '0) && !fifo_empty;
    emit     = 1'b0;
    sym      = '0;
    if (go && remaining != '0) begin
      emit = 1'b1; sym = hist[src_c];
    end else if (fifo_pop) begin
      emit = 1'b1;
      sym  = fifo_cw.is_match ? hist[src_n] : fifo_cw.lit;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(WIN); i++) hist[i] <= '0;
      wptr <= '0; off <= '0; remaining <= '0; produced <= '0; done <= 1'b0;
      out_valid <= 1'b0; out_sym <= '0;
    end else if (start) begin
      wptr <= '0; remaining <= '0; produced <= '0; done <= 1'b0; out_valid <= 1'b0;
    end else begin
      out_valid <= emit;
      if (emit) begin
        out_sym    <= sym;
        hist[wptr] <= sym;
        wptr       <= wptr + 1'b1;
        produced   <= produced + 1'b1;
      end
      if (go && remaining != '0) remaining <= remaining - 1'b1;
      else if (fifo_pop && fifo_cw.is_match) begin
        off       <= fifo_cw.off;
        remaining <= fifo_cw.len - 1'b1;
      end
      if (!active && produced == n_symbols) done <= 1'b1;
    end
  end
endmodule
