// rsa_modexp: RSA modular exponentiation coprocessor (ModExp), P = X^E mod M.
//
// Right-to-left binary exponentiation in the Montgomery domain with
// R = 2^(n+2) for an n-bit modulus:
//   P = MonMult(1, R^2 mod M);  Z = MonMult(X, R^2 mod M)
//   for i = 0 .. size_e-1:  Ptemp = MonMult(P, Z);  Z = MonMult(Z, Z);
//                           if e_i = 1 then P = Ptemp
//   P = MonMult(P, 1)
// Both products are formed for every exponent bit, so the run time does not
// depend on the exponent's bit values.  One MonMult unit is shared; the
// state machine (SM_ModExp) picks its operands (Choice_a multiplexer) from
// the operand RAMs.  The result is streamed LSB first through the MM2ME32
// shift register into 32-bit packets that land in the result RAM.
//
// Bus interface: 32-bit slave, zero-wait-state reads (readdata is
// combinational from address).  Word address = {region[2:0], index}:
//   region 0 registers: 0 control (write bit0 = start), 1 status (bit0 finish,
//            bit1 idle), 2 size_e (exponent bits), 3 size_m (modulus bits n)
//   region 1 M, 2 R^2 mod M, 3 E, 4 X (write), 5 result (read);
//   index 0 is the least significant 32-bit word.
// The host must supply R^2 mod M = 2^(2n+4) mod M; M must be odd.
// Run time: (2*size_e + 3) MonMults of n+5 clocks each (n+3 iterations, one clock to start it and one to take its result),
// then n clocks to stream the result out.
// The region map and the register layout are this design's choices.
module rsa_modexp #(
  parameter int unsigned W  = 1024,             // largest key (modulus) length
  parameter int unsigned NW = W / 32,
  parameter int unsigned IW = $clog2(NW),
  parameter int unsigned AW = IW + 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          chipselect,
  input  logic          write,
  input  logic          read,
  input  logic [AW-1:0] address,
  input  logic [31:0]   writedata,
  output logic [31:0]   readdata,
  output logic          irq            // high while a finished result waits
);
  localparam int unsigned SW = $clog2(W+1);

  typedef enum logic [3:0] {S_IDLE, S_PRE_P, S_PRE_Z, S_LOOP_P, S_LOOP_Z,
                            S_POST, S_OUT, S_PAD, S_FLUSH, S_FIN} state_e;

  logic [31:0] ram_m [NW];
  logic [31:0] ram_r [NW];
  logic [31:0] ram_e [NW];
  logic [31:0] ram_x [NW];
  logic [31:0] ram_y [NW];
  logic [W-1:0] m_vec, r_vec, e_vec, x_vec;
  logic [SW-1:0] size_e, size_m;

  always_comb begin
    for (int i = 0; i < int'(NW); i++) begin
      m_vec[32*i +: 32] = ram_m[i];
      r_vec[32*i +: 32] = ram_r[i];
      e_vec[32*i +: 32] = ram_e[i];
      x_vec[32*i +: 32] = ram_x[i];
    end
  end

  state_e st;
  logic        issued, finish;
  logic [SW-1:0] counter_e, out_cnt;
  logic [IW:0]   res_idx;
  logic [W:0]    p_reg, z_reg, mm_a, mm_b, mm_p, out_sr;
  logic          mm_start, mm_busy, mm_done;
  logic          sh, pad;
  logic [31:0]   me32;
  logic          me32_valid;

  wire [2:0]    region = address[AW-1 -: 3];
  wire [IW-1:0] idx    = address[IW-1:0];
  wire          wr     = chipselect && write;

  // Choice_a / operand multiplexer
  always_comb begin
    mm_a = '0; mm_b = '0;
    case (st)
      S_PRE_P:  begin mm_a = (W+1)'(1);   mm_b = {1'b0, r_vec}; end
      S_PRE_Z:  begin mm_a = {1'b0, x_vec}; mm_b = {1'b0, r_vec}; end
      S_LOOP_P: begin mm_a = p_reg;        mm_b = z_reg; end
      S_LOOP_Z: begin mm_a = z_reg;        mm_b = z_reg; end
      S_POST:   begin mm_a = p_reg;        mm_b = (W+1)'(1); end
      default: ;
    endcase
  end

  assign mm_start = (st inside {S_PRE_P, S_PRE_Z, S_LOOP_P, S_LOOP_Z, S_POST}) && !issued && !mm_busy;

  rsa_monmult #(.W(W)) u_monmult (
    .clk, .rst_n, .start(mm_start), .nbits(size_m), .a(mm_a), .b(mm_b), .m(m_vec),
    .p(mm_p), .busy(mm_busy), .done(mm_done));

  assign sh  = (st == S_OUT);
  assign pad = (st == S_PAD);
  rsa_mm2me32 u_mm2me32 (.clk, .rst_n, .shift(sh), .bit_in(out_sr[0]), .pad_zero(pad),
                         .word(me32), .word_valid(me32_valid));

  // SM_ModExp
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; issued <= 1'b0; finish <= 1'b0;
      counter_e <= '0; out_cnt <= '0; res_idx <= '0;
      p_reg <= '0; z_reg <= '0; out_sr <= '0;
    end else begin
      if (mm_start) issued <= 1'b1;
      if (mm_done)  issued <= 1'b0;
      case (st)
        S_IDLE: if (wr && region == 3'd0 && idx == '0 && writedata[0]) begin
          st <= S_PRE_P; finish <= 1'b0; counter_e <= '0;
        end
        S_PRE_P: if (mm_done) begin p_reg <= mm_p; st <= S_PRE_Z; end
        S_PRE_Z: if (mm_done) begin
          z_reg <= mm_p;
          st <= (size_e == '0) ? S_POST : S_LOOP_P;
        end
        S_LOOP_P: if (mm_done) begin
          if (e_vec[counter_e[$clog2(W)-1:0]]) p_reg <= mm_p;
          st <= S_LOOP_Z;
        end
        S_LOOP_Z: if (mm_done) begin
          z_reg <= mm_p;
          counter_e <= counter_e + 1'b1;
          st <= (counter_e + 1'b1 == size_e) ? S_POST : S_LOOP_P;
        end
        S_POST: if (mm_done) begin
          out_sr <= mm_p; out_cnt <= '0; res_idx <= '0; st <= S_OUT;
        end
        S_OUT: begin
          out_sr  <= out_sr >> 1;
          out_cnt <= out_cnt + 1'b1;
          if (out_cnt + 1'b1 == size_m) st <= S_PAD;
        end
        S_PAD:   st <= S_FLUSH;
        S_FLUSH: begin st <= S_FIN; end
        S_FIN:   begin finish <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
      if (me32_valid && res_idx < (IW+1)'(NW)) res_idx <= res_idx + 1'b1;
    end
  end

  // operand and result RAMs, size registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NW); i++) begin
        ram_m[i] <= '0; ram_r[i] <= '0; ram_e[i] <= '0; ram_x[i] <= '0; ram_y[i] <= '0;
      end
      size_e <= '0;
      size_m <= SW'(W);
    end else begin
      if (wr) begin
        case (region)
          3'd0: begin
            if (idx == IW'(2)) size_e <= SW'(writedata);
            if (idx == IW'(3)) size_m <= SW'(writedata);
          end
          3'd1: ram_m[idx] <= writedata;
          3'd2: ram_r[idx] <= writedata;
          3'd3: ram_e[idx] <= writedata;
          3'd4: ram_x[idx] <= writedata;
          default: ;
        endcase
      end
      if (st == S_PRE_P)
        for (int i = 0; i < int'(NW); i++) ram_y[i] <= '0;
      else if (me32_valid && res_idx < (IW+1)'(NW))
        ram_y[res_idx[IW-1:0]] <= me32;
    end
  end

  always_comb begin
    readdata = '0;
    if (chipselect && read) begin
      case (region)
        3'd0: case (idx)
                IW'(1): readdata = {30'b0, (st == S_IDLE), finish};
                IW'(2): readdata = 32'(size_e);
                IW'(3): readdata = 32'(size_m);
                default: readdata = '0;
              endcase
        3'd1: readdata = ram_m[idx];
        3'd2: readdata = ram_r[idx];
        3'd3: readdata = ram_e[idx];
        3'd4: readdata = ram_x[idx];
        3'd5: readdata = ram_y[idx];
        default: readdata = '0;
      endcase
    end
  end

  assign irq = finish;
endmodule
