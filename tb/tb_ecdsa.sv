// tb_ecdsa: ECDSA over sect163k1 with SHA-1, run on the whole coprocessor
// system through its bus port, the way the control CPU's software would
// use the cores:
//   key pair   Q = d*G                                   (ECC)
//   signing    e = SHA-1(message)                        (SHA-1, 2 blocks)
//              R = k*G, r = x(R) mod n                   (ECC, MAP)
//              s = (e + d*r) / k mod n                   (MAP)
//   verifying  u1 = e/s, u2 = r/s mod n                  (MAP)
//              X = u1*G + u2*Q, valid if x(X) mod n = r  (ECC twice, point
//                                                          addition, MAP)
// The signature is compared with a software ECDSA reference (affine point
// arithmetic and plain modular arithmetic), a tampered message must fail
// verification, and the clocks of each operation are reported next to the
// published ECDSA timings (36,846 / 23,567 / 42,685 clocks).  The message
// is the 448-bit FIPS 180 test string, two blocks after padding like the
// 512-bit message of the published measurements.  The top keeps its default
// sizes.  The protocol sequencing here is this design's illustration; the
// published system runs it as CPU software.
module tb_ecdsa;
  import rsa_ref_pkg::*;
  import ecc_ref_pkg::*;
  localparam int SEL_SHA = 1, SEL_MAP = 2, SEL_ECC = 4;
  localparam int MAP_DIV = 0, MAP_MUL = 1, MAP_ADD = 2;

  logic clk = 0, rst_n = 0;
  logic [11:0] m_address = '0;
  logic m_read = 0, m_write = 0;
  logic [31:0] m_writedata = '0, m_readdata;
  logic [5:0] irq;
  int checks = 0, failures = 0;
  longint clocks = 0;

  crypto_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) clocks++;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int sel, input int a, input logic [31:0] d);
    @(negedge clk);
    m_write = 1; m_address = {3'(sel), 9'(a)}; m_writedata = d;
    @(negedge clk);
    m_write = 0;
  endtask

  task automatic rd(input int sel, input int a, output logic [31:0] d);
    @(negedge clk);
    m_read = 1; m_address = {3'(sel), 9'(a)};
    #1 d = m_readdata;
    @(negedge clk);
    m_read = 0;
  endtask

  task automatic wait_irq(input int sel);
    int cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!irq[sel] && cyc < 100000);
    if (!irq[sel]) begin
      failures++;
      $display("FAIL coprocessor %0d never finished", sel);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endtask

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- SHA-1 of the two-block test message ----
  task automatic sha1_msg(output logic [159:0] md);
    logic [511:0] blk [2];
    logic [31:0] w;
    blk[0] = {"abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq", 8'h80, 56'h0};
    blk[1] = {448'h0, 64'd448};
    for (int b = 0; b < 2; b++) begin
      for (int i = 0; i < 16; i++) wr(SEL_SHA, 0, blk[b][511-32*i -: 32]);
      wr(SEL_SHA, 1, {30'b0, b == 0, 1'b1});
      wait_irq(SEL_SHA);
    end
    for (int i = 0; i < 5; i++) begin rd(SEL_SHA, 8 + i, w); md[159-32*i -: 32] = w; end
  endtask

  // ---- MAP: y = a op b mod n (n loaded once) ----
  task automatic map_op(input int kind, input fe_t a, input fe_t b, output fe_t y);
    logic [255:0] ea = 256'(a), eb = 256'(b), ey;
    logic [31:0] w;
    for (int i = 0; i < 6; i++) begin
      wr(SEL_MAP, i, ea[32*i +: 32]);
      wr(SEL_MAP, 8 + i, eb[32*i +: 32]);
    end
    wr(SEL_MAP, 32, 32'(1) << kind);
    wait_irq(SEL_MAP);
    for (int i = 0; i < 6; i++) begin rd(SEL_MAP, 24 + i, w); ey[32*i +: 32] = w; end
    y = ey[162:0];
  endtask

  // ---- ECC ----
  task automatic ecc_wr(input int region, input int r, input fe_t v);
    logic [191:0] e = 192'(v);
    for (int w = 0; w < 6; w++) wr(SEL_ECC, int'({2'(region), 4'(r), 3'(w)}), e[32*w +: 32]);
  endtask

  task automatic ecc_rd(input int r, output fe_t v);
    logic [191:0] e;
    logic [31:0] d;
    for (int w = 0; w < 6; w++) begin rd(SEL_ECC, int'({2'd2, 4'(r), 3'(w)}), d); e[32*w +: 32] = d; end
    v = e[162:0];
  endtask

  task automatic ecc_result(output pt_t q);
    logic [31:0] st;
    rd(SEL_ECC, 1, st);
    q.inf = st[2];
    ecc_rd(11, q.x);
    ecc_rd(12, q.y);
  endtask

  task automatic ecc_pmul(input fe_t k, input pt_t p, output pt_t q);
    ecc_wr(2, 4, p.x); ecc_wr(2, 5, p.y); ecc_wr(2, 6, 1);
    ecc_wr(1, 0, k);
    wr(SEL_ECC, 0, 1);
    wait_irq(SEL_ECC);
    ecc_result(q);
  endtask

  task automatic ecc_padd(input pt_t p1, input pt_t p2, output pt_t q);
    ecc_wr(2, 4, p1.x); ecc_wr(2, 5, p1.y);
    ecc_wr(2, 0, p2.x); ecc_wr(2, 1, p2.y); ecc_wr(2, 3, 1);
    wr(SEL_ECC, 0, 2);
    wait_irq(SEL_ECC);
    ecc_result(q);
  endtask

  // ---- reference arithmetic mod n ----
  function automatic fe_t nmul(fe_t a, fe_t b);
    return fe_t'(mulmod(num_t'(a), num_t'(b), num_t'(ORDER)));
  endfunction
  function automatic fe_t nadd(fe_t a, fe_t b);
    return fe_t'(addmod(num_t'(a) % num_t'(ORDER), num_t'(b) % num_t'(ORDER), num_t'(ORDER)));
  endfunction
  function automatic fe_t ninv(fe_t a);
    return fe_t'(expmod(num_t'(a), num_t'(ORDER) - 2, 163, num_t'(ORDER)));
  endfunction
  function automatic fe_t rand_n();
    fe_t v = fe_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom} % 192'(ORDER));
    return (v == 0) ? 1 : v;
  endfunction

  // ---- verification on the hardware; returns 1 for a valid signature ----
  task automatic verify(input fe_t e, input fe_t r, input fe_t s, input pt_t q, output bit ok);
    pt_t g, p1, p2, x;
    fe_t u1, u2, v;
    g.x = GX; g.y = GY; g.inf = 0;
    map_op(MAP_DIV, e, s, u1);
    map_op(MAP_DIV, r, s, u2);
    ecc_pmul(u1, g, p1);
    ecc_pmul(u2, q, p2);
    ecc_padd(p1, p2, x);
    map_op(MAP_ADD, x.x, 0, v);
    ok = !x.inf && v == r;
  endtask

  pt_t g, q, rp, q_ref, r_ref_pt;
  fe_t d, k, e, r, s, t, r_ref, s_ref;
  logic [159:0] md;
  logic [255:0] en;
  bit ok;
  longint c0, c_key, c_sign, c_ver;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    g.x = GX; g.y = GY; g.inf = 0;
    en = 256'(ORDER);
    for (int i = 0; i < 8; i++) wr(SEL_MAP, 16 + i, en[32*i +: 32]);   // modulus n

    // key pair
    d = rand_n();
    c0 = clocks;
    ecc_pmul(d, g, q);
    c_key = clocks - c0;
    q_ref = pmul(d, g, 1);
    check("public key", !q.inf && q.x == q_ref.x && q.y == q_ref.y);

    // signing
    k = rand_n();
    c0 = clocks;
    sha1_msg(md);
    e = fe_t'(md);
    ecc_pmul(k, g, rp);
    map_op(MAP_ADD, rp.x, 0, r);
    map_op(MAP_MUL, d, r, t);
    map_op(MAP_ADD, t, e, t);
    map_op(MAP_DIV, t, k, s);
    c_sign = clocks - c0;
    check("message digest", md == 160'h84983e44_1c3bd26e_baae4aa1_f95129e5_e54670f1);
    r_ref_pt = pmul(k, g, 1);
    r_ref = fe_t'(num_t'(r_ref_pt.x) % num_t'(ORDER));
    s_ref = nmul(ninv(k), nadd(e, nmul(d, r_ref)));
    check("signature r", r == r_ref);
    check("signature s", s == s_ref);

    // verifying
    c0 = clocks;
    sha1_msg(md);
    verify(fe_t'(md), r, s, q, ok);
    c_ver = clocks - c0;
    check("valid signature accepted", ok);
    verify(fe_t'(md) ^ 1, r, s, q, ok);
    check("tampered message rejected", !ok);

    $display("ECDSA clocks (including bus transfers): key pair %0d, signing %0d, verifying %0d",
             c_key, c_sign, c_ver);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
