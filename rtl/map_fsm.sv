// map_fsm: control unit of the modular arithmetic processor (MAP_FSM).
//
// Reads the DPU condition signals each clock and issues one set of DPU
// controls per clock.
//  Division y = a/b mod P (binary add-and-shift, Shantz):
//    A=b, B=P, U=a, V=0; while A != B:
//      A even: A=A/2, U=U/2 mod P         B even: B=B/2, V=V/2 mod P
//      A > B : A=(A-B)/2, U=(U-V)/2 mod P  else: B=(B-A)/2, V=(V-U)/2 mod P
//    result U.  "X/2 mod P" is X>>1 for even X, (X+P)>>1 for odd X;
//    a negative difference first gets P added (one extra clock).
//  Multiplication y = a*b mod P (interleaved, LSB first): A=a, U=0, V=b;
//    while A != 0: if a_0: U=U+V, U-=P if U>=P;  V=2V, V-=P if V>=P; A=A/2.
//  Addition y = a+b mod P: U=a+b, then P is subtracted while U >= P; with
//    one operand zero this is the reduction y = a mod P.
// Operands are loaded on the clock that samples a start strobe; `done` is
// high for one clock when MAP_out holds the result.
// Shantz's division algorithm follows the published core; the
// multiplication and addition sequences and the state encoding are this
// design's own.
module map_fsm
  import map_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_div,
  input  logic        start_mul,
  input  logic        start_add,
  input  map_status_t status,
  output map_ctrl_t   ctrl,
  output logic        busy,
  output logic        done
);
  typedef enum logic [3:0] {S_IDLE, S_DIV_LOOP, S_DIV_FIX, S_DIV_HALF,
                            S_MUL_LOOP, S_MUL_RED_U, S_MUL_DBL, S_MUL_RED_V,
                            S_ADD_SUM, S_ADD_RED, S_FIN} state_e;
  state_e st, st_n;
  logic   which, which_n;    // 0: the pending fix-up is on U, 1: on V

  // X/2 mod P on U (v=0) or V (v=1)
  function automatic map_ctrl_t halve(map_ctrl_t c, logic v, logic x_even);
    c.shift2 = 1'b1; c.left_shift = 1'b0;
    c.add2a_sel = v ? OP_V : OP_U; c.add2b_sel = OP_P; c.add_sub2 = 1'b0;
    c.sft2_sel = x_even ? (v ? SFT2_V : SFT2_U) : SFT2_ADD;
    if (v) begin c.ld_v = 1'b1; c.v_sel = 1'b1; end
    else   begin c.ld_u = 1'b1; c.u_sel = 1'b1; end
    return c;
  endfunction

  always_comb begin
    ctrl    = '0;
    st_n    = st;
    which_n = which;
    done    = 1'b0;
    case (st)
      S_IDLE: begin
        if (start_div || start_mul || start_add) begin
          ctrl.ld_a = 1'b1; ctrl.ld_b = 1'b1; ctrl.ld_u = 1'b1; ctrl.ld_v = 1'b1; ctrl.ld_p = 1'b1;
          st_n = start_div ? S_DIV_LOOP : start_mul ? S_MUL_LOOP : S_ADD_SUM;
        end
      end
      S_DIV_LOOP: begin
        if (status.a_eq_b) begin
          ctrl.out_en = 1'b1; st_n = S_FIN;
        end else if (status.a_even) begin
          ctrl.ld_a = 1'b1; ctrl.a_sel = 1'b1; ctrl.sft1_sel = SFT1_A;
          ctrl = halve(ctrl, 1'b0, status.u_even);
        end else if (status.b_even) begin
          ctrl.ld_b = 1'b1; ctrl.b_sel = 1'b1; ctrl.sft1_sel = SFT1_B;
          ctrl = halve(ctrl, 1'b1, status.v_even);
        end else if (status.a_gt_b) begin
          ctrl.ld_a = 1'b1; ctrl.a_sel = 1'b1; ctrl.add1a_sel = 1'b0; ctrl.add1b_sel = 1'b1;
          ctrl.add_sub1 = 1'b1; ctrl.sft1_sel = SFT1_ADD;
          ctrl.ld_u = 1'b1; ctrl.u_sel = 1'b1; ctrl.add2a_sel = OP_U; ctrl.add2b_sel = OP_V;
          ctrl.add_sub2 = 1'b1; ctrl.sft2_sel = SFT2_ADD;
          which_n = 1'b0; st_n = S_DIV_FIX;
        end else begin
          ctrl.ld_b = 1'b1; ctrl.b_sel = 1'b1; ctrl.add1a_sel = 1'b1; ctrl.add1b_sel = 1'b0;
          ctrl.add_sub1 = 1'b1; ctrl.sft1_sel = SFT1_ADD;
          ctrl.ld_v = 1'b1; ctrl.v_sel = 1'b1; ctrl.add2a_sel = OP_V; ctrl.add2b_sel = OP_U;
          ctrl.add_sub2 = 1'b1; ctrl.sft2_sel = SFT2_ADD;
          which_n = 1'b1; st_n = S_DIV_FIX;
        end
      end
      S_DIV_FIX: begin
        if (which ? status.v_neg : status.u_neg) begin
          ctrl.add2a_sel = which ? OP_V : OP_U; ctrl.add2b_sel = OP_P; ctrl.sft2_sel = SFT2_ADD;
          if (which) begin ctrl.ld_v = 1'b1; ctrl.v_sel = 1'b1; end
          else       begin ctrl.ld_u = 1'b1; ctrl.u_sel = 1'b1; end
          st_n = S_DIV_HALF;
        end else begin
          ctrl = halve(ctrl, which, which ? status.v_even : status.u_even);
          st_n = S_DIV_LOOP;
        end
      end
      S_DIV_HALF: begin
        ctrl = halve(ctrl, which, which ? status.v_even : status.u_even);
        st_n = S_DIV_LOOP;
      end
      S_MUL_LOOP: begin
        if (status.a_zero) begin
          ctrl.out_en = 1'b1; st_n = S_FIN;
        end else if (status.a_even) begin
          st_n = S_MUL_DBL;
        end else begin
          ctrl.ld_u = 1'b1; ctrl.u_sel = 1'b1; ctrl.add2a_sel = OP_U; ctrl.add2b_sel = OP_V;
          ctrl.sft2_sel = SFT2_ADD;
          st_n = S_MUL_RED_U;
        end
      end
      S_MUL_RED_U: begin
        if (status.u_gt_p || status.u_eq_p) begin
          ctrl.ld_u = 1'b1; ctrl.u_sel = 1'b1; ctrl.add2a_sel = OP_U; ctrl.add2b_sel = OP_P;
          ctrl.add_sub2 = 1'b1; ctrl.sft2_sel = SFT2_ADD;
        end
        st_n = S_MUL_DBL;
      end
      S_MUL_DBL: begin
        ctrl.ld_a = 1'b1; ctrl.a_sel = 1'b1; ctrl.sft1_sel = SFT1_A;
        ctrl.ld_v = 1'b1; ctrl.v_sel = 1'b1; ctrl.sft2_sel = SFT2_V;
        ctrl.shift2 = 1'b1; ctrl.left_shift = 1'b1;
        st_n = S_MUL_RED_V;
      end
      S_MUL_RED_V: begin
        if (status.v_gt_p || status.v_eq_p) begin
          ctrl.ld_v = 1'b1; ctrl.v_sel = 1'b1; ctrl.add2a_sel = OP_V; ctrl.add2b_sel = OP_P;
          ctrl.add_sub2 = 1'b1; ctrl.sft2_sel = SFT2_ADD;
        end
        st_n = S_MUL_LOOP;
      end
      S_ADD_SUM: begin
        ctrl.ld_u = 1'b1; ctrl.u_sel = 1'b1; ctrl.add2a_sel = OP_U; ctrl.add2b_sel = OP_V;
        ctrl.sft2_sel = SFT2_ADD;
        st_n = S_ADD_RED;
      end
      S_ADD_RED: begin
        if (status.u_gt_p || status.u_eq_p) begin
          ctrl.ld_u = 1'b1; ctrl.u_sel = 1'b1; ctrl.add2a_sel = OP_U; ctrl.add2b_sel = OP_P;
          ctrl.add_sub2 = 1'b1; ctrl.sft2_sel = SFT2_ADD;
        end else begin
          ctrl.out_en = 1'b1; st_n = S_FIN;
        end
      end
      S_FIN: begin
        done = 1'b1; st_n = S_IDLE;
      end
      default: st_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; which <= 1'b0;
    end else begin
      st <= st_n; which <= which_n;
    end
  end

  assign busy = (st != S_IDLE);
endmodule
