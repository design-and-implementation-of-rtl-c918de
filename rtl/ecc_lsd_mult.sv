// ecc_lsd_mult: least-significant-digit-first GF(2^M) multiplier,
// c = a * b mod f(x), f(x) = x^M + F(x).
// Each clock takes the next D bits of b: C += a * b_digit (mod f) and
// a = a * x^D (mod f).  A product therefore takes ceil(M/D) clocks: larger
// D trades area for speed.  Pulse start with a and b; done is high for one
// clock with c valid (c then holds).
// The LSD-first multiplier with a digit-size parameter follows the
// published core; its internal register layout is this design's own.
module ecc_lsd_mult #(
  parameter int unsigned  M = 163,
  parameter int unsigned  D = 16,
  parameter logic [M-1:0] F = M'('hC9)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] c,
  output logic         done
);
  localparam int unsigned NDIG = (M + D - 1) / D;
  localparam int unsigned CW   = $clog2(NDIG + 1);

  logic [M-1:0]  a_r, acc, acc_next, a_next;
  logic [NDIG*D-1:0] b_r;
  logic [CW-1:0] cnt;
  logic          busy;

  // times x modulo f
  function automatic logic [M-1:0] mulx(logic [M-1:0] v);
    return {v[M-2:0], 1'b0} ^ (v[M-1] ? F : '0);
  endfunction

  always_comb begin
    logic [M-1:0] s;
    s = a_r;
    acc_next = acc;
    for (int j = 0; j < int'(D); j++) begin
      if (b_r[j]) acc_next = acc_next ^ s;
      s = mulx(s);
    end
    a_next = s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r <= '0; b_r <= '0; acc <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0; c <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_r  <= a;
        b_r  <= (NDIG*D)'(b);
        acc  <= '0;
        cnt  <= CW'(NDIG);
        busy <= 1'b1;
      end else if (busy) begin
        acc <= acc_next;
        a_r <= a_next;
        b_r <= b_r >> D;
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          c    <= acc_next;
        end
      end
    end
  end
endmodule
