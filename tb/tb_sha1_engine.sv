// tb_sha1_engine: hashes the FIPS 180 examples "abc" (one block) and the
// 448-bit two-block message, checks the digests (as a 160-bit vector and as
// five read-out words) and the 81-clock step latency.
// The 81-clock latency checked is this design's own; the published core
// takes 120.
module tb_sha1_engine;
  logic clk = 0, rst_n = 0;
  logic load = 0, start = 0, first = 0, read_next = 0;
  logic [31:0] mt = '0;
  logic busy, md160_rdy, md_word_rdy;
  logic [159:0] md;
  logic [31:0] md_word;
  int checks = 0, failures = 0;

  sha1_engine dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hash_block(input logic [511:0] blk, input logic f, output int cycles);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); load = 1; mt = blk[511-32*i -: 32];
    end
    @(negedge clk); load = 0; start = 1; first = f;
    @(posedge clk); cycles = 0;
    @(negedge clk); start = 0;
    while (!md160_rdy) begin @(posedge clk); cycles++; #1; end
  endtask

  task automatic check(input string what, input logic [159:0] got, input logic [159:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  logic [159:0] words;
  int cyc;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    hash_block({32'h61626380, 416'h0, 64'h18}, 1, cyc);
    check("abc", md, 160'ha9993e36_4706816a_ba3e2571_7850c26c_9cd0d89d);
    checks++; if (cyc != 81) begin failures++; $display("FAIL latency %0d", cyc); end
    // read the digest word by word
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); read_next = 1;
      @(posedge clk); #1;
      checks++; if (!md_word_rdy) failures++;
      words[159-32*i -: 32] = md_word;
    end
    @(negedge clk); read_next = 0;
    check("abc words", words, 160'ha9993e36_4706816a_ba3e2571_7850c26c_9cd0d89d);
    // two-block message
    hash_block({"abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq", 8'h80, 56'h0}, 1, cyc);
    hash_block({448'h0, 64'd448}, 0, cyc);
    check("two block", md, 160'h84983e44_1c3bd26e_baae4aa1_f95129e5_e54670f1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
