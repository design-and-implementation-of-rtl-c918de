// map_pkg: control and status bundles exchanged between MAP_FSM and MAP_DPU
// of the modular arithmetic processor.  Field names follow the control and
// condition signals of the processor's block diagram; their encodings are
// this design's choice.
package map_pkg;

  typedef enum logic [1:0] {OP_U = 2'd0, OP_V = 2'd1, OP_P = 2'd2, OP_ZERO = 2'd3} add2_src_e;
  typedef enum logic [1:0] {SFT2_ADD = 2'd0, SFT2_U = 2'd1, SFT2_V = 2'd2} sft2_src_e;
  typedef enum logic [1:0] {SFT1_ADD = 2'd0, SFT1_A = 2'd1, SFT1_B = 2'd2} sft1_src_e;

  typedef struct packed {
    // master half: A, B, ADD1, Shifter1 (always a right shift by one)
    logic      a_sel;       // 0: external A, 1: Shifter1
    logic      b_sel;       // 0: external B, 1: Shifter1
    logic      ld_a;
    logic      ld_b;
    logic      add1a_sel;   // 0: A, 1: B
    logic      add1b_sel;   // 0: A, 1: B
    logic      add_sub1;    // 1: subtract
    sft1_src_e sft1_sel;
    // slave half: U, V, P, ADD2, Shifter2
    logic      u_sel;       // 0: external U, 1: Shifter2
    logic      v_sel;       // 0: external V, 1: Shifter2
    logic      ld_u;
    logic      ld_v;
    logic      ld_p;
    add2_src_e add2a_sel;
    add2_src_e add2b_sel;
    logic      add_sub2;    // 1: subtract
    sft2_src_e sft2_sel;
    logic      shift2;      // 1: Shifter2 shifts, 0: passes
    logic      left_shift;  // direction when shifting
    logic      out_en;      // load MAP_out from U
  } map_ctrl_t;

  typedef struct packed {
    logic a_zero, a_eq_b, a_even, b_even, a_gt_b;
    logic u_even, v_even, u_neg, v_neg;
    logic u_eq_p, v_eq_p, u_gt_p, v_gt_p;
  } map_status_t;

endpackage
