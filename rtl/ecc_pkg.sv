// ecc_pkg: microinstruction format and microprogram of the elliptic-curve
// point multiplier (GF(2^m), polynomial basis).
//
// Register file use (16 registers of m bits):
//   r0 X1, r1 Z1, r2 X2, r3 Z2  ladder state (addresses 0..3 are swapped
//                               pairwise when an instruction has `sw` set
//                               and the current key bit is 0)
//   r4 x, r5 y, r6 b            base point and curve coefficient (host)
//   r7..r15                     temporaries; result x in r11, y in r12
// Point addition (entry PADD_ENTRY) adds (r4, r5) and (r0, r1) in affine
// coordinates with the curve coefficient a in r3; result in r11, r12.
// The microprogram is generated by gen_urom(m): affine-to-projective
// conversion, the Montgomery-ladder body (M_add then M_double, López-Dahab
// formulas), and the projective-to-affine conversion whose single field
// inversion is an Itoh-Tsujii chain built from the binary expansion of m-1;
// then, from PADD_ENTRY, the affine point addition
//   lambda = (y1+y2)/(x1+x2), x3 = lambda^2+lambda+x1+x2+a,
//   y3 = lambda(x1+x3)+x3+y1,
// whose division is the same inversion chain followed by one multiply.
// x1 = x2 gives the point at infinity (P2 = -P1); P1 = P2 (a doubling)
// is not handled.
// The ladder, projective coordinates, Itoh-Tsujii inversion and affine
// point addition follow the published core; the instruction set, register
// allocation and ROM layout are this design's own.
package ecc_pkg;

  typedef enum logic [3:0] {
    U_END   = 4'd0,   // finished
    U_MUL   = 4'd1,   // rd = ra * rb
    U_SQR   = 4'd2,   // rd = ra ^ (2^n)   (n successive squarings, n >= 1)
    U_ADD   = 4'd3,   // rd = ra + rb
    U_MOV   = 4'd4,   // rd = ra
    U_SET1  = 4'd5,   // rd = 1
    U_LTOP  = 4'd6,   // loop head: leave the loop when no key bit is left
    U_LEND  = 4'd7,   // loop end: next key bit, back to the loop head
    U_JZINF = 4'd8    // if ra == 0: result is the point at infinity, stop
  } uop_e;

  typedef struct packed {
    uop_e       op;
    logic       sw;       // apply the key-bit register swap to addresses 0..3
    logic [3:0] rd;
    logic [3:0] ra;
    logic [3:0] rb;
    logic [8:0] n;
  } uinstr_t;

  localparam int unsigned UROM_LEN = 128;
  localparam int unsigned PADD_ENTRY = 64;  // first address of the point addition
  typedef uinstr_t [UROM_LEN-1:0] urom_t;

  localparam logic [3:0] X1 = 4'd0, Z1 = 4'd1, X2 = 4'd2, Z2 = 4'd3,
                         RX = 4'd4, RY = 4'd5, RB = 4'd6,
                         T7 = 4'd7, T8 = 4'd8, T9 = 4'd9, T10 = 4'd10,
                         T11 = 4'd11, T12 = 4'd12, T13 = 4'd13, T14 = 4'd14, T15 = 4'd15;

  function automatic uinstr_t ui(uop_e op, logic [3:0] rd, logic [3:0] ra, logic [3:0] rb,
                                 int n = 1, logic sw = 1'b0);
    uinstr_t u;
    u.op = op; u.sw = sw; u.rd = rd; u.ra = ra; u.rb = rb; u.n = 9'(n);
    return u;
  endfunction

  function automatic urom_t gen_urom(int m);
    urom_t r;
    int pc, k, top;
    for (int i = 0; i < int'(UROM_LEN); i++) r[i] = ui(U_END, 0, 0, 0);
    pc = 0;
    // Conv_affine_projective: (X1,Z1) = (x,1), (X2,Z2) = (x^4+b, x^2)
    r[pc++] = ui(U_MOV,  X1, RX, 0);
    r[pc++] = ui(U_SET1, Z1, 0, 0);
    r[pc++] = ui(U_SQR,  Z2, RX, 0, 1);
    r[pc++] = ui(U_SQR,  X2, Z2, 0, 1);
    r[pc++] = ui(U_ADD,  X2, X2, RB);
    // ladder body, written for key bit 1
    r[pc++] = ui(U_LTOP, 0, 0, 0);
    r[pc++] = ui(U_MUL, T7, X1, Z2, 1, 1);      // M_add
    r[pc++] = ui(U_MUL, T8, X2, Z1, 1, 1);
    r[pc++] = ui(U_ADD, Z1, T7, T8, 1, 1);
    r[pc++] = ui(U_SQR, Z1, Z1, 0, 1, 1);
    r[pc++] = ui(U_MUL, T9, RX, Z1, 1, 1);
    r[pc++] = ui(U_MUL, T7, T7, T8, 1, 1);
    r[pc++] = ui(U_ADD, X1, T9, T7, 1, 1);
    r[pc++] = ui(U_SQR, T9, X2, 0, 1, 1);       // M_double
    r[pc++] = ui(U_SQR, T10, Z2, 0, 1, 1);
    r[pc++] = ui(U_MUL, Z2, T9, T10, 1, 1);
    r[pc++] = ui(U_SQR, T9, T9, 0, 1, 1);
    r[pc++] = ui(U_SQR, T10, T10, 0, 1, 1);
    r[pc++] = ui(U_MUL, T10, RB, T10, 1, 1);
    r[pc++] = ui(U_ADD, X2, T9, T10, 1, 1);
    r[pc++] = ui(U_LEND, 0, 0, 0);
    // Conv_projective_affine
    r[pc++] = ui(U_JZINF, 0, Z1, 0);
    r[pc++] = ui(U_MUL, T7, Z1, Z2);            // Z1 Z2
    r[pc++] = ui(U_MUL, T8, RX, T7);            // x Z1 Z2
    // Itoh-Tsujii: T14 = T8^(2^k - 1), k grows along the bits of m-1
    top = 0;
    for (int i = 0; i < 31; i++) if ((((m - 1) >> i) & 1) != 0) top = i;
    r[pc++] = ui(U_MOV, T14, T8, 0);
    k = 1;
    for (int i = top - 1; i >= 0; i--) begin
      r[pc++] = ui(U_SQR, T15, T14, 0, k);
      r[pc++] = ui(U_MUL, T14, T15, T14);
      k = 2 * k;
      if ((((m - 1) >> i) & 1) != 0) begin
        r[pc++] = ui(U_SQR, T15, T14, 0, 1);
        r[pc++] = ui(U_MUL, T14, T15, T8);
        k = k + 1;
      end
    end
    r[pc++] = ui(U_SQR, T9, T14, 0, 1);         // (x Z1 Z2)^-1
    r[pc++] = ui(U_MUL, T10, RX, Z2);
    r[pc++] = ui(U_MUL, T10, T10, T9);          // 1/Z1
    r[pc++] = ui(U_MUL, T11, X1, T10);          // x_out = X1/Z1
    r[pc++] = ui(U_MUL, T12, RX, Z1);
    r[pc++] = ui(U_ADD, T12, X1, T12);          // X1 + x Z1
    r[pc++] = ui(U_MUL, T13, RX, Z2);
    r[pc++] = ui(U_ADD, T13, X2, T13);          // X2 + x Z2
    r[pc++] = ui(U_MUL, T12, T12, T13);
    r[pc++] = ui(U_SQR, T13, RX, 0, 1);
    r[pc++] = ui(U_ADD, T13, T13, RY);          // x^2 + y
    r[pc++] = ui(U_MUL, T13, T13, T7);
    r[pc++] = ui(U_ADD, T12, T12, T13);
    r[pc++] = ui(U_MUL, T12, T12, T9);
    r[pc++] = ui(U_ADD, T13, RX, T11);          // x + x_out
    r[pc++] = ui(U_MUL, T12, T12, T13);
    r[pc++] = ui(U_ADD, T12, T12, RY);          // y_out
    r[pc++] = ui(U_END, 0, 0, 0);
    // affine point addition (r4, r5) + (r0, r1), a in r3
    pc = PADD_ENTRY;
    r[pc++] = ui(U_ADD, T8, RX, X1);            // x1 + x2
    r[pc++] = ui(U_JZINF, 0, T8, 0);
    r[pc++] = ui(U_MOV, T14, T8, 0);
    k = 1;
    for (int i = top - 1; i >= 0; i--) begin
      r[pc++] = ui(U_SQR, T15, T14, 0, k);
      r[pc++] = ui(U_MUL, T14, T15, T14);
      k = 2 * k;
      if ((((m - 1) >> i) & 1) != 0) begin
        r[pc++] = ui(U_SQR, T15, T14, 0, 1);
        r[pc++] = ui(U_MUL, T14, T15, T8);
        k = k + 1;
      end
    end
    r[pc++] = ui(U_SQR, T9, T14, 0, 1);         // T8^-1
    r[pc++] = ui(U_ADD, T10, RY, Z1);           // y1 + y2
    r[pc++] = ui(U_MUL, T10, T10, T9);          // lambda
    r[pc++] = ui(U_SQR, T12, T10, 0, 1);
    r[pc++] = ui(U_ADD, T11, T12, T10);
    r[pc++] = ui(U_ADD, T11, T11, T8);
    r[pc++] = ui(U_ADD, T11, T11, Z2);          // x3 (a is in r3)
    r[pc++] = ui(U_ADD, T12, RX, T11);
    r[pc++] = ui(U_MUL, T12, T12, T10);
    r[pc++] = ui(U_ADD, T12, T12, T11);
    r[pc++] = ui(U_ADD, T12, T12, RY);          // y3
    r[pc++] = ui(U_END, 0, 0, 0);
    return r;
  endfunction

  localparam int unsigned LOOP_TOP = 5;    // address of U_LTOP in gen_urom
  localparam int unsigned LOOP_EXIT = 21;  // first address after U_LEND

endpackage
