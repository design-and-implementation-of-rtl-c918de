// tb_lzss_decompressor: builds random codeword streams (literals and
// matches of every length 2..16 at offsets up to the window size) with the
// software model, feeds the packets to the decompression unit with random
// gaps and random output stalls and compares the rebuilt symbols with the expected ones.  A stream
// of long matches must come out at one symbol per clock.
// One symbol per clock is the published rate; the code format is this
// design's own.
module tb_lzss_decompressor;
  import lzss_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  logic [31:0] n_symbols = '0, in_word = '0;
  logic in_ready, out_valid, done;
  logic out_ready = 1;
  bit   stall_out = 0;      // randomly hold off the output
  always @(negedge clk) out_ready = stall_out ? (($urandom % 3) != 0) : 1'b1;
  logic [15:0] out_sym;
  int checks = 0, failures = 0;

  lzss_decompressor dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int got[$];
  int first_clk, last_clk, clk_n = 0;
  always @(posedge clk) begin
    clk_n++;
    if (out_valid) begin
      if (got.size() == 0) first_clk = clk_n;
      last_clk = clk_n;
      got.push_back(int'(out_sym));
    end
  end

  task automatic run(input int ntok, input bit long_matches, input bit gaps);
    bitstream bs = new();
    logic [31:0] w[$];
    int exp[$];
    tok_t t;
    int bad = 0;
    for (int i = 0; i < ntok; i++) begin
      if (exp.size() == 0 || (!long_matches && ($urandom % 3) == 0)) begin
        t.is_match = 0; t.lit = $urandom % 65536; t.len = 1; t.off = 0;
        exp.push_back(t.lit);
      end else begin
        t.is_match = 1;
        t.len = long_matches ? 16 : 2 + ($urandom % 15);
        t.off = 1 + ($urandom % ((exp.size() < WIN) ? exp.size() : WIN));
        t.lit = 0;
        for (int j = 0; j < t.len; j++) exp.push_back(exp[exp.size() - t.off]);
      end
      bs.put_tok(t);
    end
    bs.to_words(w);
    got.delete();
    @(negedge clk); start = 1; n_symbols = exp.size();
    @(negedge clk); start = 0;
    foreach (w[i]) begin
      if (gaps) while (($urandom % 4) == 0) @(negedge clk);
      in_valid = 1; in_word = w[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    while (!done) @(posedge clk);
    @(negedge clk);
    checks++;
    if (got.size() != exp.size()) begin
      failures++; $display("FAIL %0d symbols, expected %0d", got.size(), exp.size());
    end else begin
      foreach (exp[i]) if (got[i] != exp[i]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("FAIL %0d symbols differ", bad); end
    end
    if (long_matches && !gaps) begin
      checks++;
      if (last_clk - first_clk + 1 > exp.size() + exp.size() / 8) begin
        failures++; $display("FAIL output rate: %0d clocks for %0d symbols", last_clk - first_clk + 1, exp.size());
      end
      $display("%0d symbols in %0d clocks", exp.size(), last_clk - first_clk + 1);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    stall_out = 1;
    run(400, 0, 1);
    stall_out = 0;
    run(400, 0, 0);
    run(200, 1, 0);
    run(1, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
