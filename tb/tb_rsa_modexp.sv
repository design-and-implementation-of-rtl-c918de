// tb_rsa_modexp: drives the ModExp coprocessor over its bus port at the
// full 1024-bit key length: loads M, R^2 mod M, E and X, starts it, polls
// the status register and reads the result, comparing with a plain
// square-and-multiply reference.  Also checks a 512-bit modulus in the
// same core and the clock count of a run.
// The clock-count formula checked is this design's own; the published total
// for 1024 bits is within 1% of it.
module tb_rsa_modexp;
  import rsa_ref_pkg::*;
  localparam int W = 1024, NW = W / 32, AW = $clog2(NW) + 3;
  logic clk = 0, rst_n = 0;
  logic chipselect = 0, write = 0, read = 0;
  logic [AW-1:0] address = '0;
  logic [31:0] writedata = '0, readdata;
  logic irq;
  int checks = 0, failures = 0;

  rsa_modexp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(input int region, input int idx, input logic [31:0] d);
    @(negedge clk);
    chipselect = 1; write = 1; address = {3'(region), ($clog2(NW))'(idx)}; writedata = d;
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  task automatic bus_read(input int region, input int idx, output logic [31:0] d);
    @(negedge clk);
    chipselect = 1; read = 1; address = {3'(region), ($clog2(NW))'(idx)};
    #1 d = readdata;
    @(negedge clk);
    chipselect = 0; read = 0;
  endtask

  task automatic load_vec(input int region, input num_t v);
    for (int i = 0; i < NW; i++) bus_write(region, i, v[32*i +: 32]);
  endtask

  task automatic run_case(input int n, input num_t e, input int ebits);
    num_t mm, x, r2, expv, got;
    logic [31:0] st, w;
    int cyc, exp_cyc;
    mm = rand_mod(n);
    x  = rand_below(mm, n);
    r2 = pow2mod(2 * n + 4, mm);
    expv = expmod(x, e, ebits, mm);
    load_vec(1, mm);
    load_vec(2, r2);
    load_vec(3, e);
    load_vec(4, x);
    bus_write(0, 2, ebits);
    bus_write(0, 3, n);
    bus_write(0, 0, 1);
    cyc = 1;  // the start write's edge
    do begin @(posedge clk); cyc++; #1; end while (!irq);
    // SM_ModExp: (2*ebits+3) MonMults of n+5 clocks, n shift clocks, 3 to finish
    exp_cyc = 1 + (2 * ebits + 3) * (n + 5) + n + 3;
    checks++;
    if (cyc != exp_cyc) begin failures++; $display("FAIL cycles %0d expected %0d", cyc, exp_cyc); end
    bus_read(0, 1, st);
    checks++;
    if (st[1:0] != 2'b11) begin failures++; $display("FAIL status %h", st); end
    got = '0;
    for (int i = 0; i < NW; i++) begin bus_read(5, i, w); got[32*i +: 32] = w; end
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL n=%0d ebits=%0d\n got %h\n exp %h", n, ebits, got, expv);
    end
    $display("n=%0d ebits=%0d cycles=%0d", n, ebits, cyc);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_case(1024, 65537, 17);                       // public-key operation
    run_case(1024, num_t'({$urandom | 32'h8000_0000}), 32);
    run_case(512, num_t'({$urandom | 32'h0010_0000}), 21);
    run_case(97, 3, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
