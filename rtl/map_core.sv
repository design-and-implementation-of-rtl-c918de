// map_core: modular arithmetic processor (MAP) for wide GF(p) operands.
//
// MAP_FSM sequences MAP_DPU to compute, for an odd modulus p of N bits:
//   start_div: y = a / b mod p   (b invertible; a = 1 gives the inverse)
//   start_mul: y = a * b mod p
//   start_add: y = a + b mod p   (b = 0 gives the reduction y = a mod p)
// Inputs a, b and p are sampled on the clock that sees a start strobe (only
// one strobe at a time).  For division and multiplication a and b must be
// below p; addition and reduction accept any N-bit a and b.  `done` is high
// for one clock with y valid; y then holds.  Cycle counts depend on the
// data: about 2N to 4N clocks for division, 1 to 4 clocks per bit of a for
// multiplication, 3 or more for addition.
// The operand-to-register assignment per operation is this design's choice.
module map_core
  import map_pkg::*;
#(
  parameter int unsigned N = 163
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_div,
  input  logic         start_mul,
  input  logic         start_add,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] p,
  output logic [N-1:0] y,
  output logic         busy,
  output logic         done
);
  map_ctrl_t   ctrl;
  map_status_t status;
  logic [N-1:0] in_a, in_b, in_u, in_v;

  // register loading per operation
  always_comb begin
    in_a = start_div ? b : a;          // divisor (div) or multiplier (mul)
    in_b = p;
    in_u = start_mul ? '0 : a;         // dividend / accumulator / addend
    in_v = start_div ? '0 : b;         // multiplicand / second addend
  end

  map_fsm u_fsm (.clk, .rst_n, .start_div, .start_mul, .start_add, .status, .ctrl, .busy, .done);

  map_dpu #(.N(N)) u_dpu (.clk, .rst_n, .in_a, .in_b, .in_u, .in_v, .in_p(p), .ctrl, .status,
                          .map_out(y));
endmodule
