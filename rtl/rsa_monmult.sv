// rsa_monmult: radix-2 Montgomery modular multiplier (MonMult).
//
// Computes P = A*B*2^-(n+2) mod M for an n-bit odd modulus M (n <= W), with
// inputs A < 2M and B < 2M and a result P < 2M, so results can be fed back
// without a final subtraction.  The loop runs n+3 iterations, i = 0..n+2:
//     q = P[0];  P = (P + q*M)/2 + a_i*B
// Bits a_(n+1) and a_(n+2) are zero because A < 2M.  P needs W+3 bits
// (it stays below M + 2B < 5M).
// One iteration per clock, over the full operand width.  This is a plain
// bit-serial, word-parallel form of the iteration; the two-way systolic
// array of single-bit processing elements used for the published core
// is not reproduced.
// Timing: pulse start (operands sampled); done pulses n+3 clocks later with
// p valid; p holds until the next start.
module rsa_monmult #(
  parameter int unsigned W = 1024      // largest modulus width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [$clog2(W+1)-1:0]   nbits,   // n, width of this modulus
  input  logic [W:0]               a,
  input  logic [W:0]               b,
  input  logic [W-1:0]             m,
  output logic [W:0]               p,
  output logic                     busy,
  output logic                     done
);
  localparam int unsigned CW = $clog2(W+4);

  logic [W+2:0] acc, acc_next, sum;
  logic [W:0]   a_sh, b_r;
  logic [W-1:0] m_r;
  logic [CW-1:0] cnt, last;

  always_comb begin
    sum      = acc + (acc[0] ? {3'b000, m_r} : '0);
    acc_next = (sum >> 1) + (a_sh[0] ? {2'b00, b_r} : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; a_sh <= '0; b_r <= '0; m_r <= '0;
      cnt <= '0; last <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        acc  <= '0;
        a_sh <= a;
        b_r  <= b;
        m_r  <= m;
        cnt  <= '0;
        last <= CW'(nbits) + CW'(2);
        busy <= 1'b1;
      end else if (busy) begin
        acc  <= acc_next;
        a_sh <= a_sh >> 1;
        cnt  <= cnt + 1'b1;
        if (cnt == last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign p = acc[W:0];
endmodule
