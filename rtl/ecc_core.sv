// ecc_core: elliptic-curve point multiplier (ECP) over GF(2^M), polynomial
// basis, computing Q = k*P with the Montgomery ladder in projective
// coordinates followed by one conversion back to affine coordinates.
//
// Control unit: a microsequencer stepping through the microcode ROM of
// ecc_pkg::gen_urom and an iteration counter holding the key k (the
// multiplier operand).  Before the microprogram starts the counter skips
// the leading zeros of k; the ladder body then runs once per remaining
// bit, from bit l-2 down to bit 0.  The body is written for key bit 1;
// for key bit 0 the register addresses X1/Z1 and X2/Z2 are swapped, so
// both cases run the same instructions in the same time.
// Datapath: 16 x M register file, arithmetic unit with the LSD-first
// multiplier (D bits per clock), a parallel squarer (one squaring per
// clock), an adder (bitwise XOR) and a zero detector.
//
// Bus interface: 32-bit slave, zero-wait-state reads.  Word address
// {region[1:0], reg[3:0], word[WB-1:0]}:
//   region 0: word 0 control (write bit0 = start a point multiplication,
//             bit1 = start a point addition), word 1 status
//             (bit0 done, bit1 idle, bit2 result is the point at infinity)
//   region 1: the key k, 32-bit words, word 0 least significant
//   region 2: register file, register `reg`, word `word`
// Load x into r4, y into r5 and the curve coefficient b into r6 and k,
// start, wait for done, then read x(kP) from r11 and y(kP) from r12.
// Point addition P1 + P2 in affine coordinates: load P1 into r4/r5, P2
// into r0/r1 and the coefficient a into r3; the sum lands in r11/r12
// (x1 = x2 is reported as the point at infinity, right for P2 = -P1; the
// doubling case P1 = P2 is left to the point multiplication, 2*P).
// One addition at M=163, D=16 takes about 350 clocks.
// Timing: a multiply instruction takes ceil(M/D)+2 clocks, an n-fold
// squaring n+1, add/move/set 2, loop control 1.  At M=163, D=16 one ladder
// step takes 6*13 + 5*2 + 3*2 + 2 = 96 clocks.
// Instruction encoding, register allocation and the bus map are this
// design's own; the recovery of y assumes (k+1)P is not the point at
// infinity.
module ecc_core
  import ecc_pkg::*;
#(
  parameter int unsigned  M  = 163,
  parameter int unsigned  D  = 16,
  parameter logic [M-1:0] F  = M'('hC9),     // sect163k1: x^163+x^7+x^6+x^3+1
  parameter int unsigned  NW = (M + 31) / 32,
  parameter int unsigned  WB = $clog2(NW),
  parameter int unsigned  AW = WB + 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          chipselect,
  input  logic          write,
  input  logic          read,
  input  logic [AW-1:0] address,
  input  logic [31:0]   writedata,
  output logic [31:0]   readdata,
  output logic          irq
);
  localparam urom_t UROM = gen_urom(int'(M));
  localparam int unsigned KW = $clog2(M + 1);

  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_FETCH, S_EXEC, S_WAITMUL, S_DONE} state_e;

  logic [M-1:0]  rf [16];
  logic [NW*32-1:0] k_reg;
  state_e        st;
  logic [6:0]    pc;
  uinstr_t       ui_r;
  logic [KW-1:0] rem;                    // ladder steps still to run
  logic          kbit, done_flag, inf_flag;
  logic [M-1:0]  opa, opb, sq_in, sq_out, mul_c, work;
  logic [8:0]    cnt;
  logic          mul_start, mul_done;

  wire [1:0]    region = address[AW-1 -: 2];
  wire [3:0]    rsel   = address[WB +: 4];
  wire [WB-1:0] widx   = address[WB-1:0];
  wire          wr     = chipselect && write;

  // key bit of the current ladder step and the register swap it implies
  assign kbit = (rem != '0) ? k_reg[rem - 1'b1] : 1'b1;
  function automatic logic [3:0] phys(logic [3:0] r, logic sw, logic kb);
    return (sw && !kb && r < 4'd4) ? (r ^ 4'd2) : r;
  endfunction

  uinstr_t cur;
  assign cur = UROM[pc];

  ecc_squarer #(.M(M), .F(F)) u_sq (.a(sq_in), .y(sq_out));
  ecc_lsd_mult #(.M(M), .D(D), .F(F)) u_mul (.clk, .rst_n, .start(mul_start), .a(opa), .b(opb),
                                             .c(mul_c), .done(mul_done));
  assign sq_in     = work;
  assign mul_start = (st == S_EXEC) && (ui_r.op == U_MUL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pc <= '0; ui_r <= '0; rem <= '0; cnt <= '0;
      opa <= '0; opb <= '0; work <= '0; done_flag <= 1'b0; inf_flag <= 1'b0;
      k_reg <= '0;
      for (int i = 0; i < 16; i++) rf[i] <= '0;
    end else begin
      case (st)
        S_IDLE: begin
          if (wr && region == 2'd1) k_reg[32*widx +: 32] <= writedata;
          if (wr && region == 2'd2) rf[rsel][32*widx +: 32] <= writedata;   // host access
          if (wr && region == 2'd0 && widx == '0 && writedata[0]) begin
            st <= S_SCAN; rem <= KW'(M - 1); done_flag <= 1'b0; inf_flag <= 1'b0; pc <= '0;
          end else if (wr && region == 2'd0 && widx == '0 && writedata[1]) begin
            st <= S_FETCH; rem <= '0; done_flag <= 1'b0; inf_flag <= 1'b0; pc <= 7'(PADD_ENTRY);
          end
        end
        // iteration counter: find the leading one of k
        S_SCAN: begin
          if (k_reg[rem]) st <= S_FETCH;            // rem = l-1 steps remain
          else if (rem == '0) begin inf_flag <= 1'b1; st <= S_DONE; end
          else rem <= rem - 1'b1;
        end
        S_FETCH: begin
          ui_r <= cur;
          opa  <= rf[phys(cur.ra, cur.sw, kbit)];
          opb  <= rf[phys(cur.rb, cur.sw, kbit)];
          work <= rf[phys(cur.ra, cur.sw, kbit)];
          cnt  <= cur.n;
          case (cur.op)
            U_END:  st <= S_DONE;
            U_LTOP: pc <= (rem == '0) ? 7'(LOOP_EXIT) : pc + 1'b1;
            U_LEND: begin rem <= rem - 1'b1; pc <= 7'(LOOP_TOP); end
            U_JZINF: if (rf[cur.ra] == '0) begin inf_flag <= 1'b1; st <= S_DONE; end
                     else pc <= pc + 1'b1;
            default: st <= S_EXEC;
          endcase
        end
        S_EXEC: begin
          case (ui_r.op)
            U_MUL: st <= S_WAITMUL;
            U_SQR: begin
              work <= sq_out;
              cnt  <= cnt - 1'b1;
              if (cnt == 9'd1) begin
                rf[phys(ui_r.rd, ui_r.sw, kbit)] <= sq_out;
                pc <= pc + 1'b1; st <= S_FETCH;
              end
            end
            U_ADD: begin
              rf[phys(ui_r.rd, ui_r.sw, kbit)] <= opa ^ opb;
              pc <= pc + 1'b1; st <= S_FETCH;
            end
            U_MOV: begin
              rf[phys(ui_r.rd, ui_r.sw, kbit)] <= opa;
              pc <= pc + 1'b1; st <= S_FETCH;
            end
            U_SET1: begin
              rf[phys(ui_r.rd, ui_r.sw, kbit)] <= M'(1);
              pc <= pc + 1'b1; st <= S_FETCH;
            end
            default: begin pc <= pc + 1'b1; st <= S_FETCH; end
          endcase
        end
        S_WAITMUL: if (mul_done) begin
          rf[phys(ui_r.rd, ui_r.sw, kbit)] <= mul_c;
          pc <= pc + 1'b1; st <= S_FETCH;
        end
        S_DONE: begin done_flag <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    readdata = '0;
    if (chipselect && read) begin
      case (region)
        2'd0: readdata = (widx == WB'(1)) ? {29'b0, inf_flag, (st == S_IDLE), done_flag} : '0;
        2'd1: readdata = k_reg[32*widx +: 32];
        2'd2: readdata = 32'({{(NW*32-M){1'b0}}, rf[rsel]} >> (32*widx));
        default: readdata = '0;
      endcase
    end
  end

  assign irq = done_flag;
endmodule
