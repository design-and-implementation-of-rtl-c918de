// lzss_coder: LZSS encoder with a systolic, content-addressed dictionary.
//
// The window of the last WIN symbols is a shift register; every position
// compares its symbol with the incoming one in the same clock (WIN
// comparators working in parallel), so one symbol is consumed per clock
// whatever the data.  A vector `alive` marks the window distances at which
// the current phrase still matches; each new symbol keeps only the
// distances where it matches too.  When no distance survives (or the phrase
// reaches MAXLEN) the phrase is emitted: as a literal if it is one symbol
// long, else as a match at the nearest surviving distance; the new symbol
// starts the next phrase.  This is greedy parsing with a minimum match of
// two symbols.
// Interface: start clears the window; in_valid/in_sym deliver symbols,
// in_last marks the final one, after which the pending phrase is emitted
// on the next clock with cw.last set.  cw_valid pulses for each codeword
// (at most one per clock).
// The systolic one-symbol-per-clock coder follows the published core; the
// window of 256 symbols, the longest match of 16 and greedy parsing are
// this design's choices.
module lzss_coder
  import lzss_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          in_valid,
  input  logic [SW-1:0] in_sym,
  input  logic          in_last,
  output logic          cw_valid,
  output cw_t           cw
);
  logic [SW-1:0]  dict [WIN];
  logic [WIN-1:0] dvalid, alive, eq, cont;
  logic [SW-1:0]  lit;
  logic [LW-1:0]  len;
  logic           flush;
  logic [OW:0]    near;       // nearest surviving distance (1-based)

  always_comb begin
    for (int j = 0; j < int'(WIN); j++) eq[j] = dvalid[j] && (dict[j] == in_sym);
    cont = alive & eq;
    near = '0;
    for (int j = int'(WIN) - 1; j >= 0; j--) if (alive[j]) near = (OW+1)'(j + 1);
  end

  function automatic cw_t phrase(logic [SW-1:0] l, logic [LW-1:0] n, logic [OW:0] d, logic lst);
    cw_t c;
    c.is_match = (n > LW'(1));
    c.lit = l; c.len = n; c.off = d; c.last = lst;
    return c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(WIN); j++) dict[j] <= '0;
      dvalid <= '0; alive <= '0; lit <= '0; len <= '0; flush <= 1'b0;
      cw_valid <= 1'b0; cw <= '0;
    end else begin
      cw_valid <= 1'b0;
      if (start) begin
        dvalid <= '0; alive <= '0; len <= '0; flush <= 1'b0;
      end else if (flush) begin
        flush    <= 1'b0;
        cw_valid <= 1'b1;
        cw       <= phrase(lit, len, near, 1'b1);
        len      <= '0;
        alive    <= '0;
      end else if (in_valid) begin
        dict[0] <= in_sym;
        for (int j = 1; j < int'(WIN); j++) dict[j] <= dict[j-1];
        dvalid <= {dvalid[WIN-2:0], 1'b1};
        flush  <= in_last;
        if (len != '0 && cont != '0 && len < LW'(MAXLEN)) begin
          alive <= cont;
          len   <= len + 1'b1;
        end else begin
          if (len != '0) begin
            cw_valid <= 1'b1;
            cw       <= phrase(lit, len, near, 1'b0);
          end
          lit   <= in_sym;
          alive <= eq;
          len   <= LW'(1);
        end
      end
    end
  end
endmodule
