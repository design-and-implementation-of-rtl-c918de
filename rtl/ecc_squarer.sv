// ecc_squarer: parallel GF(2^M) squarer for a fixed reduction polynomial
// f(x) = x^M + F(x).  Squaring spreads the bits (a_i -> position 2i); the
// 2M-1-bit result is then reduced by folding every bit at or above x^M
// down with F.  Purely combinational; one squaring per clock in the
// arithmetic unit.
module ecc_squarer #(
  parameter int unsigned  M = 163,
  parameter logic [M-1:0] F = M'('hC9)       // x^7 + x^6 + x^3 + 1
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] y
);
  logic [2*M-2:0] t;
  always_comb begin
    t = '0;
    for (int i = 0; i < int'(M); i++) t[2*i] = a[i];
    for (int i = 2*int'(M) - 2; i >= int'(M); i--)
      if (t[i]) begin
        t[i] = 1'b0;
        t[i-int'(M) +: M] = t[i-int'(M) +: M] ^ F;
      end
    y = t[M-1:0];
  end
endmodule
