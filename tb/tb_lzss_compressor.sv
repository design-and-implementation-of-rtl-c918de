// tb_lzss_compressor: streams symbols into the compression unit at one per
// clock, collects the packets, decodes them with the software model and
// compares with the input.  Checks that every symbol was accepted on
// consecutive clocks, that the data compressed, and that a random
// incompressible stream still round-trips.
// One symbol per clock is the published rate; the code format is this
// design's own.
module tb_lzss_compressor;
  import lzss_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_last = 0;
  logic [15:0] in_sym = '0;
  logic out_valid, out_last;
  logic [31:0] out_word;
  int checks = 0, failures = 0;

  lzss_compressor dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] words[$];
  always @(posedge clk) if (out_valid) words.push_back(out_word);

  task automatic run(input int d[$], input bit expect_gain);
    int dec[$];
    int bad = 0;
    words.delete();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    foreach (d[i]) begin
      in_valid = 1; in_sym = 16'(d[i]); in_last = (i == d.size() - 1);
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
    while (!(out_valid && out_last)) @(posedge clk);
    @(negedge clk);
    checks++;
    if (!decode(words, d.size(), dec)) begin failures++; $display("FAIL malformed stream"); end
    else begin
      foreach (d[i]) if (dec[i] != d[i]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("FAIL %0d symbols differ", bad); end
    end
    $display("%0d symbols (%0d bits) -> %0d packets, ratio %0.2f:1", d.size(), 16 * d.size(),
             words.size(), real'(16 * d.size()) / real'(32 * words.size()));
    if (expect_gain) begin
      checks++;
      if (32 * words.size() * 3 / 2 > 16 * d.size()) begin failures++; $display("FAIL little compression"); end
    end
  endtask

  int d[$];
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    gen_data(3000, d);
    run(d, 1);
    d.delete();
    for (int i = 0; i < 500; i++) d.push_back($urandom % 65536);
    run(d, 0);
    d.delete();
    for (int i = 0; i < 300; i++) d.push_back(7);
    run(d, 1);
    d = '{5};
    run(d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
