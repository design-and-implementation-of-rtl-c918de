// sha1_msg_expansion: SHA-1 message expansion unit.
//
// A 16-word shift register.  While `load` is high one 32-bit message word Mt
// is shifted in per clock (M0 first).  During the 80 compression steps
// (`step` high) it supplies Wt: for t < 16 the stored words rotate out in
// order; for t >= 16 the new word ROTL1(W[t-3]^W[t-8]^W[t-14]^W[t-16]) is
// formed from the window and shifted in.  t is the step number supplied by
// the engine.  wt is combinational from the
// registers; the shift happens on the clock edge of each step.
// The 16-word shift-register schedule is this design's choice; the
// published core only calls its SHA-1 processor systolic.
module sha1_msg_expansion (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [31:0] mt,
  input  logic        step,
  input  logic [6:0]  t,
  output logic [31:0] wt
);
  logic [31:0] w [16];   // w[0] = oldest word

  logic [31:0] x;
  always_comb begin
    x  = w[13] ^ w[8] ^ w[2] ^ w[0];
    wt = (t < 7'd16) ? w[0] : {x[30:0], x[31]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) w[i] <= '0;
    end else if (load || step) begin
      for (int i = 0; i < 15; i++) w[i] <= w[i+1];
      w[15] <= load ? mt : wt;
    end
  end
endmodule
