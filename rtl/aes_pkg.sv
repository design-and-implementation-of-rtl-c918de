// aes_pkg: byte-level GF(2^8) arithmetic and the AES-128 state transformations
// shared by the S-box, the key generator and the round datapath.
//
// State layout follows FIPS-197: byte k of the 128-bit block sits in bits
// [127-8k -: 8], and state[row][col] is byte (row + 4*col).  The S-box is
// computed (multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 followed
// by the affine map) rather than read from a table; the inverse is formed as
// x^254 with a fixed square-and-multiply chain.
package aes_pkg;

  localparam int unsigned NR = 10;   // rounds of AES-128

  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, t;
    p = 8'h00;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // a^254 = a^-1 (0 maps to 0)
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] sq, acc;
    sq  = gf_mul(a, a);          // a^2
    acc = sq;
    for (int i = 0; i < 6; i++) begin
      sq  = gf_mul(sq, sq);      // a^4 .. a^128
      acc = gf_mul(acc, sq);
    end
    return acc;
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  function automatic logic [7:0] inv_affine(input logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = b[(i+2)%8] ^ b[(i+5)%8] ^ b[(i+7)%8];
    return r ^ 8'h05;
  endfunction

  function automatic logic [7:0] get_byte(input logic [127:0] s, input int k);
    return s[127-8*k -: 8];
  endfunction

  function automatic logic [127:0] shift_rows(input logic [127:0] s, input logic inv);
    logic [127:0] r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127-8*(row+4*c) -: 8] = inv ? get_byte(s, row + 4*((c + 4 - row) % 4))
                                      : get_byte(s, row + 4*((c + row) % 4));
    return r;
  endfunction

  function automatic logic [31:0] mix_col(input logic [31:0] w, input logic inv);
    logic [7:0] a [4];
    logic [31:0] r;
    for (int i = 0; i < 4; i++) a[i] = w[31-8*i -: 8];
    for (int i = 0; i < 4; i++) begin
      if (!inv)
        r[31-8*i -: 8] = xtime(a[i]) ^ (xtime(a[(i+1)%4]) ^ a[(i+1)%4]) ^ a[(i+2)%4] ^ a[(i+3)%4];
      else
        r[31-8*i -: 8] = gf_mul(a[i], 8'h0e) ^ gf_mul(a[(i+1)%4], 8'h0b)
                       ^ gf_mul(a[(i+2)%4], 8'h0d) ^ gf_mul(a[(i+3)%4], 8'h09);
    end
    return r;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s, input logic inv);
    logic [127:0] r;
    for (int c = 0; c < 4; c++) r[127-32*c -: 32] = mix_col(s[127-32*c -: 32], inv);
    return r;
  endfunction

  function automatic logic [7:0] rcon(input logic [3:0] rnd);
    case (rnd)
      4'd1: return 8'h01;  4'd2: return 8'h02;  4'd3: return 8'h04;
      4'd4: return 8'h08;  4'd5: return 8'h10;  4'd6: return 8'h20;
      4'd7: return 8'h40;  4'd8: return 8'h80;  4'd9: return 8'h1b;
      4'd10: return 8'h36;
      default: return 8'h00;
    endcase
  endfunction

endpackage
