// tb_ecc_core: point multiplications k*G on sect163k1 through the bus port
// of the point multiplier, compared with an affine double-and-add
// reference; k = 1, 2, 3, random 163-bit keys and the group order (which
// must give the point at infinity).  Checks the clock count of one run.
// Also affine point additions P1 + P2 against the reference addition,
// including P + (-P), and the clock count of one addition (at most the
// 705 clocks of the published D=16 core).
module tb_ecc_core;
  import ecc_ref_pkg::*;
  localparam int NW = 6, WB = 3, AW = WB + 6;
  logic clk = 0, rst_n = 0;
  logic chipselect = 0, write = 0, read = 0;
  logic [AW-1:0] address = '0;
  logic [31:0] writedata = '0, readdata;
  logic irq;
  int checks = 0, failures = 0;

  ecc_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    // affine point addition: G + 2G, random multiples, P + (-P)
    for (int t = 0; t < 4; t++) begin
      pt_t p1, p2, sum;
      fe_t k1, k2;
      logic [31:0] st;
      k1 = (t == 0) ? 1 : M'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom} % 192'(ORDER));
      k2 = (t == 0) ? 2 : (t == 3) ? M'(ORDER - k1) : M'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom} % 192'(ORDER));
      p1 = pmul(k1, g, 1);
      p2 = pmul(k2, g, 1);
      e = padd(p1, p2, 1);
      write_fe(2, 4, p1.x); write_fe(2, 5, p1.y);
      write_fe(2, 0, p2.x); write_fe(2, 1, p2.y);
      write_fe(2, 3, 1);
      bus_write(0, 0, 0, 2);
      cyc = 1;
      do begin @(posedge clk); cyc++; #1; end while (!irq);
      bus_read(0, 0, 1, st);
      sum.inf = st[2];
      read_fe(11, sum.x);
      read_fe(12, sum.y);
      check_pt($sformatf("point addition %0d", t), sum, e);
      if (t == 0) begin
        $display("point addition: %0d clocks", cyc);
        checks++;
        if (cyc > 705) begin failures++; $display("FAIL point addition took %0d clocks", cyc); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(input int region, input int r, input int w, input logic [31:0] d);
    @(negedge clk);
    chipselect = 1; write = 1; address = {2'(region), 4'(r), 3'(w)}; writedata = d;
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  task automatic bus_read(input int region, input int r, input int w, output logic [31:0] d);
    @(negedge clk);
    chipselect = 1; read = 1; address = {2'(region), 4'(r), 3'(w)};
    #1 d = readdata;
    @(negedge clk);
    chipselect = 0; read = 0;
  endtask

  task automatic write_fe(input int region, input int r, input fe_t v);
    logic [191:0] e = 192'(v);
    for (int w = 0; w < NW; w++) bus_write(region, r, w, e[32*w +: 32]);
  endtask

  task automatic read_fe(input int r, output fe_t v);
    logic [191:0] e;
    logic [31:0] d;
    for (int w = 0; w < NW; w++) begin bus_read(2, r, w, d); e[32*w +: 32] = d; end
    v = e[M-1:0];
  endtask

  task automatic pmul_hw(input fe_t k, output pt_t q, output int cyc);
    logic [31:0] st;
    write_fe(1, 0, k);
    bus_write(0, 0, 0, 1);
    cyc = 1;
    do begin @(posedge clk); cyc++; #1; end while (!irq);
    bus_read(0, 0, 1, st);
    q.inf = st[2];
    read_fe(11, q.x);
    read_fe(12, q.y);
  endtask

  task automatic check_pt(input string what, input pt_t got, input pt_t exp);
    checks++;
    if (got.inf != exp.inf || (!exp.inf && (got.x != exp.x || got.y != exp.y))) begin
      failures++;
      $display("FAIL %s: got inf=%0d %h %h\n     expected inf=%0d %h %h", what,
               got.inf, got.x, got.y, exp.inf, exp.x, exp.y);
    end
  endtask

  pt_t g, q, e;
  fe_t k;
  int cyc;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    g.x = GX; g.y = GY; g.inf = 0;
    checks++;
    if (!on_curve(GX, GY, 1, 1)) begin failures++; $display("FAIL generator not on curve"); end
    write_fe(2, 4, GX);
    write_fe(2, 5, GY);
    write_fe(2, 6, 1);
    for (int t = 0; t < 6; t++) begin
      case (t)
        0: k = 1;
        1: k = 2;
        2: k = 3;
        default: k = M'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom} % 192'(ORDER));
      endcase
      pmul_hw(k, q, cyc);
      e = pmul(k, g, 1);
      check_pt($sformatf("k=%h", k), q, e);
      if (t == 5) $display("random 163-bit key: %0d clocks", cyc);
    end
    pmul_hw(ORDER, q, cyc);
    checks++;
    if (!q.inf) begin failures++; $display("FAIL n*G is not the point at infinity"); end
    // clock count of the full-length key: scan + init + 162 ladder steps + conversion
    pmul_hw(ORDER, q, cyc);
    checks++;
    if (cyc < 162 * 96 || cyc > 162 * 96 + 3000) begin failures++; $display("FAIL clocks %0d", cyc); end
    $display("n*G: %0d clocks", cyc);
    // affine point addition: G + 2G, random multiples, P + (-P)
    for (int t = 0; t < 4; t++) begin
      pt_t p1, p2, sum;
      fe_t k1, k2;
      logic [31:0] st;
      k1 = (t == 0) ? 1 : M'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom} % 192'(ORDER));
      k2 = (t == 0) ? 2 : (t == 3) ? M'(ORDER - k1) : M'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom} % 192'(ORDER));
      p1 = pmul(k1, g, 1);
      p2 = pmul(k2, g, 1);
      e = padd(p1, p2, 1);
      write_fe(2, 4, p1.x); write_fe(2, 5, p1.y);
      write_fe(2, 0, p2.x); write_fe(2, 1, p2.y);
      write_fe(2, 3, 1);
      bus_write(0, 0, 0, 2);
      cyc = 1;
      do begin @(posedge clk); cyc++; #1; end while (!irq);
      bus_read(0, 0, 1, st);
      sum.inf = st[2];
      read_fe(11, sum.x);
      read_fe(12, sum.y);
      check_pt($sformatf("point addition %0d", t), sum, e);
      if (t == 0) begin
        $display("point addition: %0d clocks", cyc);
        checks++;
        if (cyc > 705) begin failures++; $display("FAIL point addition took %0d clocks", cyc); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
