// tb_rsa_monmult: random Montgomery products at n = 1024 and n = 61 bits.
// Checks P < 2M, P*2^(n+2) = A*B (mod M) using a plain modular reference,
// and the n+3 clock latency.
// The n+3 iteration count checked is this design's choice of R = 2^(n+2).
module tb_rsa_monmult;
  import rsa_ref_pkg::*;
  localparam int W = 1024;
  logic clk = 0, rst_n = 0, start = 0;
  logic [$clog2(W+1)-1:0] nbits = '0;
  logic [W:0] a = '0, b = '0, p;
  logic [W-1:0] m = '0;
  logic busy, done;
  int checks = 0, failures = 0;

  rsa_monmult #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  num_t mm, aa, bb, got, lhs, rhs;
  int cyc;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      automatic int n = (t % 2 == 0) ? 1024 : 61;
      mm = rand_mod(n);
      aa = rand_below(mm, n);
      bb = rand_below(mm, n);
      if (t % 3 == 0) aa = aa + mm;      // exercise the A, B < 2M range
      if (t % 4 == 1) bb = bb + mm;
      @(negedge clk);
      nbits = ($clog2(W+1))'(n); a = aa[W:0]; b = bb[W:0]; m = mm[W-1:0]; start = 1;
      @(posedge clk); cyc = 0;
      @(negedge clk); start = 0;
      while (!done) begin @(posedge clk); cyc++; #1; end
      got = num_t'(p);
      lhs = mulmod(got, pow2mod(n + 2, mm), mm);
      rhs = mulmod(aa, bb, mm);
      checks++;
      if (lhs != rhs) begin failures++; $display("FAIL product t=%0d", t); end
      checks++;
      if (got >= 2 * mm) begin failures++; $display("FAIL range t=%0d", t); end
      checks++;
      if (cyc != n + 3) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
