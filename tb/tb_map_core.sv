// tb_map_core: random modular division, inversion, multiplication,
// addition and reduction modulo the 163-bit prime order of the sect163k1
// curve group, each checked against a plain shift-and-add reference
// (division is checked as y*b = a mod p).  Reports the clock counts.
// Clock counts are reported, not checked: they depend on the data, and the
// published ones are averages of unknown inputs.
module tb_map_core;
  import rsa_ref_pkg::*;
  localparam int N = 163;
  localparam logic [N-1:0] ORDER = 163'h4_00000000_00000000_00020108_a2e0cc0d_99f8a5ef;
  logic clk = 0, rst_n = 0;
  logic start_div = 0, start_mul = 0, start_add = 0;
  logic [N-1:0] a = '0, b = '0, p = ORDER, y;
  logic busy, done;
  int checks = 0, failures = 0;

  map_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input int kind, input logic [N-1:0] x, input logic [N-1:0] z,
                    output logic [N-1:0] r, output int cyc);
    @(negedge clk);
    while (busy) @(negedge clk);
    a = x; b = z;
    start_div = (kind == 0); start_mul = (kind == 1); start_add = (kind == 2);
    @(posedge clk); cyc = 0;
    @(negedge clk); start_div = 0; start_mul = 0; start_add = 0;
    while (!done) begin @(posedge clk); cyc++; #1; end
    r = y;
  endtask

  task automatic check(input string what, input num_t got, input num_t exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  num_t pp, x, z, r;
  logic [N-1:0] res;
  int cyc, cdiv = 0, cmul = 0, cadd = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    pp = num_t'(ORDER);
    for (int t = 0; t < 20; t++) begin
      x = rand_below(pp, N);
      z = rand_below(pp, N);
      if (z == 0) z = 1;
      op(0, x[N-1:0], z[N-1:0], res, cyc); cdiv += cyc;
      check("div", mulmod(num_t'(res), z, pp), x);
      checks++; if (num_t'(res) >= pp) failures++;
      op(0, 1, z[N-1:0], res, cyc);
      check("inv", mulmod(num_t'(res), z, pp), 1);
      op(1, x[N-1:0], z[N-1:0], res, cyc); cmul += cyc;
      check("mul", num_t'(res), mulmod(x, z, pp));
      op(2, x[N-1:0], z[N-1:0], res, cyc); cadd += cyc;
      check("add", num_t'(res), addmod(x, z, pp));
      // reduction of an arbitrary 163-bit value
      r = '0; r[N-1:0] = N'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      op(2, r[N-1:0], 0, res, cyc);
      check("reduce", num_t'(res), r % pp);
    end
    $display("average clocks: div %0d mul %0d add %0d", cdiv / 20, cmul / 20, cadd / 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
