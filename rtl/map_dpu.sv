// map_dpu: datapath of the modular arithmetic processor (MAP_DPU).
//
// Master half: registers A and B, adder/subtractor ADD1 fed by Mux1/Mux2,
// Mux3 and Shifter1 (right shift by one), whose output returns to A and B.
// Slave half: registers U, V and the modulus P, adder/subtractor ADD2 fed
// by Mux4/Mux5, Mux6 and Shifter2 (right or left shift, or pass), whose
// output returns to U and V.  U is the result (MAP_out).
// A and B are N bits; U and V are N+2-bit two's complement values so that
// U-V, U+P and 2U never overflow.  Everything the FSM needs to branch on is
// computed combinationally from the registers (status).  All register
// loads happen on the rising clock edge when their ld_* strobe is high.
// The split into a datapath steered by the MAP FSM follows the published
// core; register widths and the operand multiplexers are this design's own.
module map_dpu
  import map_pkg::*;
#(
  parameter int unsigned N = 163
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  in_a,
  input  logic [N-1:0]  in_b,
  input  logic [N-1:0]  in_u,
  input  logic [N-1:0]  in_v,
  input  logic [N-1:0]  in_p,
  input  map_ctrl_t     ctrl,
  output map_status_t   status,
  output logic [N-1:0]  map_out
);
  localparam int unsigned SW = N + 2;

  logic [N-1:0]  reg_a, reg_b, add1_x, add1_y, add1, sft1_in, sft1;
  logic [SW-1:0] reg_u, reg_v, reg_p, add2_x, add2_y, add2, sft2_in, sft2;

  function automatic logic [SW-1:0] pick2(add2_src_e s, logic [SW-1:0] xu, logic [SW-1:0] xv,
                                          logic [SW-1:0] xp);
    case (s)
      OP_U:    return xu;
      OP_V:    return xv;
      OP_P:    return xp;
      default: return '0;
    endcase
  endfunction

  always_comb begin
    // master
    add1_x  = ctrl.add1a_sel ? reg_b : reg_a;
    add1_y  = ctrl.add1b_sel ? reg_b : reg_a;
    add1    = ctrl.add_sub1 ? add1_x - add1_y : add1_x + add1_y;
    case (ctrl.sft1_sel)
      SFT1_A:  sft1_in = reg_a;
      SFT1_B:  sft1_in = reg_b;
      default: sft1_in = add1;
    endcase
    sft1    = sft1_in >> 1;
    // slave
    add2_x  = pick2(ctrl.add2a_sel, reg_u, reg_v, reg_p);
    add2_y  = pick2(ctrl.add2b_sel, reg_u, reg_v, reg_p);
    add2    = ctrl.add_sub2 ? add2_x - add2_y : add2_x + add2_y;
    case (ctrl.sft2_sel)
      SFT2_U:  sft2_in = reg_u;
      SFT2_V:  sft2_in = reg_v;
      default: sft2_in = add2;
    endcase
    if (!ctrl.shift2)         sft2 = sft2_in;
    else if (ctrl.left_shift) sft2 = sft2_in << 1;
    else                      sft2 = {sft2_in[SW-1], sft2_in[SW-1:1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_a <= '0; reg_b <= '0; reg_u <= '0; reg_v <= '0; reg_p <= '0; map_out <= '0;
    end else begin
      if (ctrl.ld_a) reg_a <= ctrl.a_sel ? sft1 : in_a;
      if (ctrl.ld_b) reg_b <= ctrl.b_sel ? sft1 : in_b;
      if (ctrl.ld_u) reg_u <= ctrl.u_sel ? sft2 : {2'b00, in_u};
      if (ctrl.ld_v) reg_v <= ctrl.v_sel ? sft2 : {2'b00, in_v};
      if (ctrl.ld_p) reg_p <= {2'b00, in_p};
      if (ctrl.out_en) map_out <= reg_u[N-1:0];
    end
  end

  always_comb begin
    status.a_zero = (reg_a == '0);
    status.a_eq_b = (reg_a == reg_b);
    status.a_even = !reg_a[0];
    status.b_even = !reg_b[0];
    status.a_gt_b = (reg_a > reg_b);
    status.u_even = !reg_u[0];
    status.v_even = !reg_v[0];
    status.u_neg  = reg_u[SW-1];
    status.v_neg  = reg_v[SW-1];
    status.u_eq_p = (reg_u == reg_p);
    status.v_eq_p = (reg_v == reg_p);
    status.u_gt_p = !reg_u[SW-1] && (reg_u > reg_p);
    status.v_gt_p = !reg_v[SW-1] && (reg_v > reg_p);
  end
endmodule
