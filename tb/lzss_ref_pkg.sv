// lzss_ref_pkg: software model of the LZSS stream format used by the LZSS
// testbenches: a bit-level encoder for a list of codewords and a decoder
// that rebuilds the symbols from 32-bit packets.  Same code as lzss_pkg
// describes, written independently of the RTL.
// The code it models is this design's own.
package lzss_ref_pkg;
  localparam int SW = 16, OW = 8, WIN = 256;

  typedef struct { bit is_match; int lit; int len; int off; } tok_t;

  class bitstream;
    bit bits[$];
    function void put(int v, int n);
      for (int i = n - 1; i >= 0; i--) bits.push_back(((v >> i) & 1) != 0);
    endfunction
    function void put_tok(tok_t t);
      if (!t.is_match) begin put(0, 1); put(t.lit, SW); end
      else begin
        put(1, 1);
        if (t.len == 2) put(0, 2);
        else if (t.len == 3) put(1, 2);
        else if (t.len == 4) put(4, 3);
        else if (t.len == 5) put(5, 3);
        else begin put(3, 2); put(t.len - 6, 4); end
        put(t.off - 1, OW);
      end
    endfunction
    function void to_words(ref logic [31:0] w[$]);
      int n = bits.size();
      w.delete();
      for (int i = 0; i < n; i += 32) begin
        logic [31:0] x = '0;
        for (int j = 0; j < 32; j++) x[31-j] = (i + j < n) ? bits[i+j] : 1'b0;
        w.push_back(x);
      end
    endfunction
  endclass

  // decode packets into nsym symbols; returns 0 on a malformed stream
  function automatic bit decode(logic [31:0] w[$], int nsym, ref int out[$]);
    bit b[$];
    int pos = 0;
    foreach (w[i]) for (int j = 31; j >= 0; j--) b.push_back(w[i][j]);
    out.delete();
    while (out.size() < nsym) begin
      int len, off, v;
      if (pos + 1 > b.size()) return 0;
      if (!b[pos++]) begin
        v = 0;
        for (int i = 0; i < SW; i++) v = (v << 1) | int'(b[pos++]);
        out.push_back(v);
      end else begin
        if (!b[pos] && !b[pos+1]) begin len = 2; pos += 2; end
        else if (!b[pos] && b[pos+1]) begin len = 3; pos += 2; end
        else if (b[pos] && !b[pos+1]) begin len = b[pos+2] ? 5 : 4; pos += 3; end
        else begin
          pos += 2; len = 0;
          for (int i = 0; i < 4; i++) len = (len << 1) | int'(b[pos++]);
          len += 6;
        end
        off = 0;
        for (int i = 0; i < OW; i++) off = (off << 1) | int'(b[pos++]);
        off += 1;
        if (off > out.size()) return 0;
        for (int i = 0; i < len; i++) out.push_back(out[out.size() - off]);
      end
      if (pos > b.size()) return 0;
    end
    return 1;
  endfunction

  // test data: symbols from a small alphabet with frequent repeats
  function automatic void gen_data(int n, ref int d[$]);
    d.delete();
    while (d.size() < n) begin
      if (d.size() > 8 && ($urandom % 3) != 0) begin
        int off = 1 + ($urandom % ((d.size() < 200) ? d.size() : 200));
        int len = 2 + ($urandom % 20);
        for (int i = 0; i < len && d.size() < n; i++) d.push_back(d[d.size() - off]);
      end else d.push_back($urandom % 64);
    end
  endfunction
endpackage
