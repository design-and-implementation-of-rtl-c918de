// tb_secure_transfer: the secure file transfer that the whole system is
// built for, run on crypto_top at its default sizes through the bus port.
//   sender    a fresh 128-bit session key encrypts the 64-byte file with
//             AES-128 (CBC chaining done by the host); RSA-1024 encrypts the
//             session key under the receiver's public key (e = 65537); SHA-1
//             hashes the file and ECDSA (sect163k1) signs the digest.
//   receiver  RSA-1024 decrypts the session key with the private exponent
//             (a full 1024-bit exponent, about 2.1 million clocks); AES-128
//             decrypts the file (the first block pays for the decryption key
//             derivation); SHA-1 hashes it and ECDSA verifies the signature.
// Checks: the recovered session key and file equal the originals, the
// digest equals the SHA-1 of the file, the RSA ciphertext equals a software
// modular exponentiation, the signature verifies, and a signature over a
// changed digest does not.  The receiver here decrypts before it verifies,
// because the signature covers the plain file; the order of the steps and
// the CBC mode are this testbench's choices.  The RSA key pair is a fixed
// random 1024-bit pair (two 512-bit primes, e = 65537, d = e^-1 mod phi).
module tb_secure_transfer;
  import rsa_ref_pkg::*;
  import ecc_ref_pkg::*;
  localparam int SEL_AES = 0, SEL_SHA = 1, SEL_MAP = 2, SEL_RSA = 3, SEL_ECC = 4;
  localparam int MAP_DIV = 0, MAP_MUL = 1, MAP_ADD = 2;
  localparam logic [1023:0] RSA_N = 1024'hbb103db8223e395f52be6497028eaf2a4dc57e286a7525a7e3d1895e9201dd51ae999d6a60e4e20881151371b9885c8203131f3db78d1d30da8f68c337d94d9eda25b2fb6a05097312e19965dec183d3da51bc4d7fa3f74c2e41679e914d1b4c3bd14111734ed7832cec840f15fa2925ff82fe75e4a8b10940c4e9590d4ef3d5;
  localparam logic [1023:0] RSA_D = 1024'h188c110d50b109a6509d5b65d59813b461704115dca272c68d46b9d80720e782087f7000bda64b63024d59b7dab8e22acd6c7cf50459283378fac8ac956f9697c007d9b485902d9b6702ff522e6241cccaa5be05b2d74fbff520098c6f2d4b45953a8387b464aa394ff2d6ccd27ea9e8186d64215d653ae0038c0795e8459001;
  localparam logic [511:0] FILE = "Quarterly report: all figures are confidential. Do not forward.!";
  localparam logic [159:0] FILE_SHA1 = 160'hc0b5e0dac80364df1d6974628845a3f643360f39;

  logic clk = 0, rst_n = 0;
  logic [11:0] m_address = '0;
  logic m_read = 0, m_write = 0;
  logic [31:0] m_writedata = '0, m_readdata;
  logic [5:0] irq;
  int checks = 0, failures = 0;

  crypto_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
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
    do begin @(posedge clk); cyc++; #1; end while (!irq[sel] && cyc < 2200000);
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

  // ---- AES ----
  task automatic aes_block(input logic [127:0] din, input bit enc, input bit ldkey,
                           output logic [127:0] dout);
    logic [31:0] w;
    for (int i = 0; i < 4; i++) wr(SEL_AES, 4 + i, din[127-32*i -: 32]);
    wr(SEL_AES, 8, {29'b0, ldkey, enc, 1'b1});
    wait_irq(SEL_AES);
    for (int i = 0; i < 4; i++) begin rd(SEL_AES, 12 + i, w); dout[127-32*i -: 32] = w; end
  endtask

  task automatic aes_key(input logic [127:0] k);
    for (int i = 0; i < 4; i++) wr(SEL_AES, i, k[127-32*i -: 32]);
  endtask

  // ---- SHA-1 of a 512-bit file (two blocks after padding) ----
  task automatic sha1_file(input logic [511:0] f, output logic [159:0] md);
    logic [511:0] blk [2];
    logic [31:0] w;
    blk[0] = f;
    blk[1] = {1'b1, 447'h0, 64'd512};
    for (int b = 0; b < 2; b++) begin
      for (int i = 0; i < 16; i++) wr(SEL_SHA, 0, blk[b][511-32*i -: 32]);
      wr(SEL_SHA, 1, {30'b0, b == 0, 1'b1});
      wait_irq(SEL_SHA);
    end
    for (int i = 0; i < 5; i++) begin rd(SEL_SHA, 8 + i, w); md[159-32*i -: 32] = w; end
  endtask

  // ---- RSA: x^e mod N ----
  task automatic rsa_exp(input num_t x, input num_t e, input int ebits, output num_t y);
    num_t r2 = pow2mod(2 * 1024 + 4, num_t'(RSA_N)), m = num_t'(RSA_N);
    logic [31:0] w;
    for (int i = 0; i < 32; i++) begin
      wr(SEL_RSA, int'({3'd1, 5'(i)}), m[32*i +: 32]);
      wr(SEL_RSA, int'({3'd2, 5'(i)}), r2[32*i +: 32]);
      wr(SEL_RSA, int'({3'd3, 5'(i)}), e[32*i +: 32]);
      wr(SEL_RSA, int'({3'd4, 5'(i)}), x[32*i +: 32]);
    end
    wr(SEL_RSA, 2, ebits);
    wr(SEL_RSA, 3, 1024);
    wr(SEL_RSA, 0, 1);
    wait_irq(SEL_RSA);
    y = '0;
    for (int i = 0; i < 32; i++) begin rd(SEL_RSA, int'({3'd5, 5'(i)}), w); y[32*i +: 32] = w; end
  endtask

  // ---- MAP: y = a op b mod n ----
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

  function automatic fe_t rand_n();
    fe_t v = fe_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom} % 192'(ORDER));
    return (v == 0) ? 1 : v;
  endfunction

  // ---- ECDSA on the cores ----
  task automatic ecdsa_sign(input fe_t e, input fe_t d, output fe_t r, output fe_t s);
    pt_t g, rp;
    fe_t k = rand_n(), t;
    g.x = GX; g.y = GY; g.inf = 0;
    ecc_pmul(k, g, rp);
    map_op(MAP_ADD, rp.x, 0, r);
    map_op(MAP_MUL, d, r, t);
    map_op(MAP_ADD, t, e, t);
    map_op(MAP_DIV, t, k, s);
  endtask

  task automatic ecdsa_verify(input fe_t e, input fe_t r, input fe_t s, input pt_t q, output bit ok);
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

  logic [127:0] session, iv, prev, blk, got_session;
  logic [127:0] cipher [4];
  logic [511:0] received;
  logic [159:0] md;
  num_t c_key, k_back;
  pt_t g, q_sender;
  fe_t d_sender, r, s;
  logic [255:0] en;
  bit ok;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    g.x = GX; g.y = GY; g.inf = 0;
    en = 256'(ORDER);
    for (int i = 0; i < 8; i++) wr(SEL_MAP, 16 + i, en[32*i +: 32]);
    d_sender = rand_n();
    ecc_pmul(d_sender, g, q_sender);                      // sender's ECC key pair

    // ---------------- sender ----------------
    session = {$urandom, $urandom, $urandom, $urandom};
    iv      = {$urandom, $urandom, $urandom, $urandom};
    aes_key(session);
    prev = iv;
    for (int i = 0; i < 4; i++) begin
      aes_block(FILE[511-128*i -: 128] ^ prev, 1, i == 0, cipher[i]);
      prev = cipher[i];
    end
    rsa_exp(num_t'(session), 65537, 17, c_key);
    check("RSA encryption of the session key",
          c_key == expmod(num_t'(session), 65537, 17, num_t'(RSA_N)));
    sha1_file(FILE, md);
    check("SHA-1 of the file", md == FILE_SHA1);
    ecdsa_sign(fe_t'(md), d_sender, r, s);

    // ---------------- receiver ----------------
    rsa_exp(c_key, num_t'(RSA_D), 1024, k_back);
    got_session = k_back[127:0];
    check("session key recovered", k_back == num_t'(session));
    aes_key(got_session);
    prev = iv;
    for (int i = 0; i < 4; i++) begin
      aes_block(cipher[i], 0, i == 0, blk);
      received[511-128*i -: 128] = blk ^ prev;
      prev = cipher[i];
    end
    check("file recovered", received == FILE);
    sha1_file(received, md);
    ecdsa_verify(fe_t'(md), r, s, q_sender, ok);
    check("signature verifies", ok);
    ecdsa_verify(fe_t'(md) ^ 2, r, s, q_sender, ok);
    check("signature over another digest fails", !ok);

    $display("received: %s", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
