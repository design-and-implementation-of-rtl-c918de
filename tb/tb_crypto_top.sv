// tb_crypto_top: end-to-end test of the whole coprocessor system through
// its single 32-bit bus port, acting as the control CPU.  The top keeps its
// default sizes (AES-128, RSA up to 1024 bits, GF(2^163) ECC, 163-bit MAP,
// 16-bit LZSS symbols).  Every mechanism exercised is counted and a
// mechanism that never happened counts as a failure:
//   AES encryption, decryption with the one-time last-round-key derivation
//   (longer first run) and decryption reusing it; SHA-1 first block and a
//   chained second block; MAP division, multiplication and addition; RSA
//   1024-bit exponentiation; ECC point multiplication, the point at
//   infinity and point addition; two coprocessors busy at the same time; LZSS compression,
//   decompression, and the decompressor pausing on a full symbol FIFO;
//   reads of an unused address returning zero.
// Results are checked against FIPS test vectors and the reference models
// of the other testbenches.
// The top runs at its default sizes; the register maps used are this
// design's own.
module tb_crypto_top;
  import rsa_ref_pkg::*;
  import ecc_ref_pkg::*;
  import lzss_ref_pkg::*;
  localparam int SEL_AES = 0, SEL_SHA = 1, SEL_MAP = 2, SEL_RSA = 3, SEL_ECC = 4, SEL_LZSS = 5;
  localparam logic [162:0] ORD = 163'h4_00000000_00000000_00020108_a2e0cc0d_99f8a5ef;

  logic clk = 0, rst_n = 0;
  logic [11:0] m_address = '0;
  logic m_read = 0, m_write = 0;
  logic [31:0] m_writedata = '0, m_readdata;
  logic [5:0] irq;
  int checks = 0, failures = 0;

  crypto_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_aes_enc = 0, n_aes_derive = 0, n_aes_dec = 0, n_sha_first = 0, n_sha_chain = 0;
  int n_map_div = 0, n_map_mul = 0, n_map_add = 0, n_rsa = 0, n_ecc = 0, n_ecc_inf = 0, n_ecc_add = 0;
  int n_overlap = 0, n_lz_comp = 0, n_lz_decomp = 0, n_lz_stall = 0, n_unmapped = 0;

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

  // a coprocessor that never finishes ends the test at once
  task automatic wait_irq(input int sel, output int cyc);
    cyc = 0;
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

  // ---------------- AES ----------------
  task automatic aes_run(input logic [127:0] din, input bit enc, input bit ldkey,
                         output logic [127:0] dout, output int cyc);
    logic [31:0] w;
    for (int i = 0; i < 4; i++) wr(SEL_AES, 4 + i, din[127-32*i -: 32]);
    wr(SEL_AES, 8, {29'b0, ldkey, enc, 1'b1});
    wait_irq(SEL_AES, cyc);
    for (int i = 0; i < 4; i++) begin rd(SEL_AES, 12 + i, w); dout[127-32*i -: 32] = w; end
  endtask

  task automatic test_aes();
    logic [127:0] key = 128'h000102030405060708090a0b0c0d0e0f, r;
    int c_enc, c_dec1, c_dec2;
    for (int i = 0; i < 4; i++) wr(SEL_AES, i, key[127-32*i -: 32]);
    aes_run(128'h00112233445566778899aabbccddeeff, 1, 1, r, c_enc);
    check("AES encrypt", r == 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    if (r == 128'h69c4e0d86a7b0430d8cdb78070b4c55a) n_aes_enc++;
    aes_run(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0, 0, r, c_dec1);
    check("AES first decrypt", r == 128'h00112233445566778899aabbccddeeff);
    aes_run(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0, 0, r, c_dec2);
    check("AES second decrypt", r == 128'h00112233445566778899aabbccddeeff);
    if (r == 128'h00112233445566778899aabbccddeeff) n_aes_dec++;
    check("AES derivation only once", c_dec1 > c_dec2);
    if (c_dec1 > c_dec2) n_aes_derive++;
    $display("AES clocks: encrypt %0d, first decrypt %0d, decrypt %0d", c_enc, c_dec1, c_dec2);
  endtask

  // ---------------- SHA-1 ----------------
  task automatic sha_block(input logic [511:0] blk, input bit first, output logic [159:0] md);
    logic [31:0] w;
    int cyc;
    for (int i = 0; i < 16; i++) wr(SEL_SHA, 0, blk[511-32*i -: 32]);
    wr(SEL_SHA, 1, {30'b0, first, 1'b1});
    wait_irq(SEL_SHA, cyc);
    for (int i = 0; i < 5; i++) begin rd(SEL_SHA, 8 + i, w); md[159-32*i -: 32] = w; end
  endtask

  task automatic test_sha();
    logic [159:0] md;
    sha_block({32'h61626380, 416'h0, 64'h18}, 1, md);
    check("SHA-1 abc", md == 160'ha9993e36_4706816a_ba3e2571_7850c26c_9cd0d89d);
    if (md == 160'ha9993e36_4706816a_ba3e2571_7850c26c_9cd0d89d) n_sha_first++;
    sha_block({"abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq", 8'h80, 56'h0}, 1, md);
    sha_block({448'h0, 64'd448}, 0, md);
    check("SHA-1 two blocks", md == 160'h84983e44_1c3bd26e_baae4aa1_f95129e5_e54670f1);
    if (md == 160'h84983e44_1c3bd26e_baae4aa1_f95129e5_e54670f1) n_sha_chain++;
  endtask

  // ---------------- MAP ----------------
  task automatic map_op(input int kind, input logic [162:0] x, input logic [162:0] z,
                        output logic [162:0] y);
    logic [255:0] ex = 256'(x), ez = 256'(z), ey;
    logic [31:0] w;
    int cyc;
    for (int i = 0; i < 8; i++) begin
      wr(SEL_MAP, i, ex[32*i +: 32]);
      wr(SEL_MAP, 8 + i, ez[32*i +: 32]);
    end
    wr(SEL_MAP, 32, 32'(1) << kind);
    wait_irq(SEL_MAP, cyc);
    for (int i = 0; i < 8; i++) begin rd(SEL_MAP, 24 + i, w); ey[32*i +: 32] = w; end
    y = ey[162:0];
  endtask

  task automatic test_map();
    logic [255:0] ep = 256'(ORD);
    num_t pp = num_t'(ORD), x, z;
    logic [162:0] y;
    for (int i = 0; i < 8; i++) wr(SEL_MAP, 16 + i, ep[32*i +: 32]);
    for (int t = 0; t < 3; t++) begin
      x = rand_below(pp, 163);
      z = rand_below(pp, 163);
      if (z == 0) z = 1;
      map_op(0, x[162:0], z[162:0], y);
      check("MAP divide", mulmod(num_t'(y), z, pp) == x);
      if (mulmod(num_t'(y), z, pp) == x) n_map_div++;
      map_op(1, x[162:0], z[162:0], y);
      check("MAP multiply", num_t'(y) == mulmod(x, z, pp));
      if (num_t'(y) == mulmod(x, z, pp)) n_map_mul++;
      map_op(2, x[162:0], z[162:0], y);
      check("MAP add", num_t'(y) == addmod(x, z, pp));
      if (num_t'(y) == addmod(x, z, pp)) n_map_add++;
    end
  endtask

  // ---------------- RSA ----------------
  task automatic test_rsa(input int n, input num_t e, input int ebits);
    num_t mm, x, r2, expv, got;
    logic [31:0] w;
    int cyc;
    mm = rand_mod(n);
    x  = rand_below(mm, n);
    r2 = pow2mod(2 * n + 4, mm);
    expv = expmod(x, e, ebits, mm);
    for (int i = 0; i < RW / 32; i++) begin
      wr(SEL_RSA, int'({3'd1, 5'(i)}), mm[32*i +: 32]);
      wr(SEL_RSA, int'({3'd2, 5'(i)}), r2[32*i +: 32]);
      wr(SEL_RSA, int'({3'd3, 5'(i)}), e[32*i +: 32]);
      wr(SEL_RSA, int'({3'd4, 5'(i)}), x[32*i +: 32]);
    end
    wr(SEL_RSA, 2, ebits);
    wr(SEL_RSA, 3, n);
    wr(SEL_RSA, 0, 1);
    wait_irq(SEL_RSA, cyc);
    got = '0;
    for (int i = 0; i < RW / 32; i++) begin rd(SEL_RSA, int'({3'd5, 5'(i)}), w); got[32*i +: 32] = w; end
    check($sformatf("RSA %0d-bit, %0d-bit exponent", n, ebits), got == expv);
    if (got == expv) n_rsa++;
    $display("RSA %0d-bit, %0d exponent bits: %0d clocks", n, ebits, cyc);
  endtask

  // ---------------- ECC ----------------
  task automatic ecc_write_fe(input int region, input int r, input fe_t v);
    logic [191:0] e = 192'(v);
    for (int w = 0; w < 6; w++) wr(SEL_ECC, int'({2'(region), 4'(r), 3'(w)}), e[32*w +: 32]);
  endtask

  task automatic ecc_read_fe(input int r, output fe_t v);
    logic [191:0] e;
    logic [31:0] d;
    for (int w = 0; w < 6; w++) begin rd(SEL_ECC, int'({2'd2, 4'(r), 3'(w)}), d); e[32*w +: 32] = d; end
    v = e[162:0];
  endtask

  task automatic ecc_start(input fe_t k);
    ecc_write_fe(2, 4, GX);
    ecc_write_fe(2, 5, GY);
    ecc_write_fe(2, 6, 1);
    ecc_write_fe(1, 0, k);
    wr(SEL_ECC, 0, 1);
  endtask

  task automatic ecc_finish(input fe_t k);
    pt_t g, q, e;
    logic [31:0] st;
    int cyc;
    g.x = GX; g.y = GY; g.inf = 0;
    wait_irq(SEL_ECC, cyc);
    rd(SEL_ECC, 1, st);
    q.inf = st[2];
    ecc_read_fe(11, q.x);
    ecc_read_fe(12, q.y);
    e = pmul(k, g, 1);
    if (e.inf) begin
      check("ECC n*G at infinity", q.inf);
      if (q.inf) n_ecc_inf++;
    end else begin
      check("ECC k*G", !q.inf && q.x == e.x && q.y == e.y);
      if (!q.inf && q.x == e.x && q.y == e.y) n_ecc++;
    end
  endtask

  // affine point addition k1*G + k2*G
  task automatic ecc_add(input fe_t k1, input fe_t k2);
    pt_t g, p1, p2, q, e;
    logic [31:0] st;
    int cyc;
    g.x = GX; g.y = GY; g.inf = 0;
    p1 = pmul(k1, g, 1);
    p2 = pmul(k2, g, 1);
    e = padd(p1, p2, 1);
    ecc_write_fe(2, 4, p1.x); ecc_write_fe(2, 5, p1.y);
    ecc_write_fe(2, 0, p2.x); ecc_write_fe(2, 1, p2.y);
    ecc_write_fe(2, 3, 1);
    wr(SEL_ECC, 0, 2);
    wait_irq(SEL_ECC, cyc);
    rd(SEL_ECC, 1, st);
    q.inf = st[2];
    ecc_read_fe(11, q.x);
    ecc_read_fe(12, q.y);
    check("ECC point addition", !q.inf && q.x == e.x && q.y == e.y);
    if (!q.inf && q.x == e.x && q.y == e.y) n_ecc_add++;
  endtask

  // ---------------- LZSS ----------------
  task automatic test_lzss(input int nsym);
    int d[$], out[$];
    logic [31:0] pk[$], st, w;
    int wi, guard;
    gen_data(nsym, d);
    // compress, draining the packet FIFO as it fills
    wr(SEL_LZSS, 1, 1);
    foreach (d[i]) begin
      wr(SEL_LZSS, 0, {15'b0, i == nsym - 1, 16'(d[i])});
      rd(SEL_LZSS, 6, st);
      if (st[14:8] > 7'd32) while (st[14:8] != 0) begin rd(SEL_LZSS, 2, w); pk.push_back(w); rd(SEL_LZSS, 6, st); end
    end
    guard = 0;
    do begin
      rd(SEL_LZSS, 6, st);
      while (st[14:8] != 0) begin rd(SEL_LZSS, 2, w); pk.push_back(w); rd(SEL_LZSS, 6, st); end
      guard++;
    end while (!st[0] && guard < 1000);
    check("LZSS compressed stream decodes", decode(pk, nsym, out) && out == d);
    check("LZSS compresses", pk.size() * 32 < nsym * 16);
    if (out == d && pk.size() * 32 < nsym * 16) n_lz_comp++;
    $display("LZSS: %0d symbols -> %0d packets", nsym, pk.size());
    // decompress: feed packets first, take symbols only when no packet fits
    wr(SEL_LZSS, 4, nsym);
    wr(SEL_LZSS, 1, 2);
    out.delete();
    wi = 0;
    guard = 0;
    do begin
      rd(SEL_LZSS, 6, st);
      // 63 or more symbols waiting: the decompressor is held back
      if (st[22:16] >= 7'd63 && !st[1]) n_lz_stall++;
      if (wi < pk.size() && st[2]) begin wr(SEL_LZSS, 3, pk[wi]); wi++; end
      else if (st[22:16] != 0) begin rd(SEL_LZSS, 5, w); out.push_back(int'(w[15:0])); end
      guard++;
    end while ((!st[1] || st[22:16] != 0) && guard < 200000);
    check("LZSS decompressed", out == d);
    if (out == d) n_lz_decomp++;
  endtask

  logic [31:0] st, w;
  fe_t k;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // unused select field reads as zero
    rd(7, 0, w);
    check("unused address", w == 0);
    if (w == 0) n_unmapped++;

    // ECC runs while AES, SHA-1 and MAP are used
    k = 163'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom} % 192'(ORD));
    ecc_start(k);
    test_aes();
    test_sha();
    test_map();
    rd(SEL_ECC, 1, st);
    if (!st[1]) n_overlap++;
    ecc_finish(k);
    ecc_start(ORD);
    ecc_finish(ORD);
    ecc_add(5, 7);

    test_rsa(1024, 65537, 17);
    test_rsa(1024, num_t'({$urandom | 32'h8000_0000}), 32);
    test_lzss(700);

    check("mechanism: AES encryption", n_aes_enc > 0);
    check("mechanism: AES decryption key derivation", n_aes_derive > 0);
    check("mechanism: AES decryption", n_aes_dec > 0);
    check("mechanism: SHA-1 first block", n_sha_first > 0);
    check("mechanism: SHA-1 chained block", n_sha_chain > 0);
    check("mechanism: MAP division", n_map_div > 0);
    check("mechanism: MAP multiplication", n_map_mul > 0);
    check("mechanism: MAP addition", n_map_add > 0);
    check("mechanism: RSA exponentiation", n_rsa > 0);
    check("mechanism: ECC point multiplication", n_ecc > 0);
    check("mechanism: ECC point at infinity", n_ecc_inf > 0);
    check("mechanism: ECC point addition", n_ecc_add > 0);
    check("mechanism: two coprocessors busy together", n_overlap > 0);
    check("mechanism: LZSS compression", n_lz_comp > 0);
    check("mechanism: LZSS decompression", n_lz_decomp > 0);
    check("mechanism: LZSS output stall", n_lz_stall > 0);
    check("mechanism: unused address", n_unmapped > 0);
    $display("decompressor seen stalled %0d times", n_lz_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
