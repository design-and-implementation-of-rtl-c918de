// tb_aes_core: checks the AES-128 core against the FIPS-197 example vectors
// (encryption and decryption), checks the 43/86-cycle latencies, and runs
// random blocks through encrypt-then-decrypt.
// The 43 and 86 clock latencies checked are the published ones.
module tb_aes_core;
  logic clk = 0, rst_n = 0;
  logic key_valid = 0, start = 0, enc = 1;
  logic [127:0] key = '0, data_in = '0, data_out;
  logic done, busy;
  int checks = 0, failures = 0;

  aes_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_key(input logic [127:0] k);
    @(negedge clk); key = k; key_valid = 1;
    @(negedge clk); key_valid = 0;
  endtask

  task automatic run(input logic e, input logic [127:0] din, output logic [127:0] dout,
                     output int cycles);
    @(negedge clk); enc = e; data_in = din; start = 1;
    @(posedge clk); cycles = 0;
    @(negedge clk); start = 0;
    while (!done) begin @(posedge clk); cycles++; #1; end
    dout = data_out;
  endtask

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_int(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic [127:0] r, r2, pt, k;
  int cyc;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // FIPS-197 Appendix C.1
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    run(1, 128'h00112233445566778899aabbccddeeff, r, cyc);
    check("C.1 encrypt", r, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    check_int("encrypt latency", cyc, 43);
    run(0, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, r, cyc);
    check("C.1 decrypt", r, 128'h00112233445566778899aabbccddeeff);
    check_int("first decrypt latency", cyc, 86);
    run(0, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, r, cyc);
    check("C.1 decrypt again", r, 128'h00112233445566778899aabbccddeeff);
    check_int("later decrypt latency", cyc, 43);
    // FIPS-197 Appendix B
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    run(1, 128'h3243f6a8885a308d313198a2e0370734, r, cyc);
    check("B encrypt", r, 128'h3925841d02dc09fbdc118597196a0b32);
    run(0, 128'h3925841d02dc09fbdc118597196a0b32, r, cyc);
    check("B decrypt", r, 128'h3243f6a8885a308d313198a2e0370734);
    check_int("decrypt latency after new key", cyc, 86);
    // random round trips
    for (int i = 0; i < 20; i++) begin
      k  = {$urandom, $urandom, $urandom, $urandom};
      pt = {$urandom, $urandom, $urandom, $urandom};
      load_key(k);
      run(1, pt, r, cyc);
      run(0, r, r2, cyc);
      check("round trip", r2, pt);
      checks++;
      if (r == pt) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
