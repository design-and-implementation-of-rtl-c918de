// aes_core: AES-128 encryption/decryption core (KeyGen + control unit +
// shared encryption/decryption datapath).
//
// One 128-bit datapath serves both directions.  Decryption uses the
// "equivalent" ordering InvSubBytes -> InvShiftRows -> InvMixColumns ->
// AddRoundKey(InvMixColumns(rk)), so that it has the same shape as
// encryption: Pt/Ct -> m2 -> ARK -> M-SB -> M-SR -> M-MC -> m1 -> m2 -> ARK.
// m2 (sel_m2, first round) picks the input block for the initial key
// addition; m1 (sel_m1, final round) bypasses MixColumns in round 10.
// A round takes four clock cycles, one per register stage (SB, SR, MC, ARK).
//
// Interface: pulse key_valid with `key` to load a cipher key (while idle).
// Pulse start with data_in and enc (1 = encrypt).  done pulses for one cycle
// with data_out valid (held until the next block).
// Timing, counted in rising edges from the one that samples start to the
// one that raises done: 43 for encryption and for decryption under a key
// already used for decryption; 86 for the first decryption after a key load,
// which first runs the key schedule forward to get the round-10 key.
// The 4-cycle round and the fixed overhead of 3 cycles are chosen to give
// those totals; the stage split is this design's own.
module aes_core
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         key_valid,
  input  logic [127:0] key,
  input  logic         start,
  input  logic         enc,
  input  logic [127:0] data_in,
  output logic [127:0] data_out,
  output logic         done,
  output logic         busy
);
  typedef enum logic [3:0] {S_IDLE, S_LOAD, S_DPREP, S_DERIVE, S_DSAVE, S_DWAIT,
                            S_PREP, S_ARK0, S_ROUND} state_e;
  state_e      st;
  logic [1:0]  phase;
  logic [3:0]  rnd;          // round being computed, 1..10
  logic        enc_r;
  logic [127:0] din_r, state_r, sb_r, sr_r, mc_r;
  logic [127:0] rk;
  logic         last_valid;

  // key generator control
  logic kg_first, kg_last, kg_save, kg_step, kg_dir;
  logic [3:0] kg_rnd;

  aes_keygen u_keygen (
    .clk, .rst_n, .key_load(key_valid && st == S_IDLE), .key,
    .to_first(kg_first), .to_last(kg_last), .save_last(kg_save),
    .step(kg_step), .dir(kg_dir), .rnd(kg_rnd), .rk, .last_valid);

  // M-SB: sixteen shared forward/inverse S-boxes
  logic [127:0] sb_out;
  for (genvar k = 0; k < 16; k++) begin : g_sbox
    aes_sbox u_sb (.din(state_r[127-8*k -: 8]), .inv(!enc_r), .dout(sb_out[127-8*k -: 8]));
  end

  logic sel_m1, sel_m2;           // final-round bypass, first-round input
  logic [127:0] mc_out, m1_out, ark_key, m2_out, ark_out;
  always_comb begin
    sel_m1  = (rnd == 4'(NR));
    sel_m2  = (st == S_ARK0);
    mc_out  = mix_columns(sr_r, !enc_r);
    m1_out  = sel_m1 ? sr_r : mc_out;
    ark_key = (!enc_r && !sel_m1 && !sel_m2) ? mix_columns(rk, 1'b1) : rk;
    m2_out  = sel_m2 ? din_r : mc_r;
    ark_out = m2_out ^ ark_key;
  end

  always_comb begin
    kg_first = 1'b0; kg_last = 1'b0; kg_save = 1'b0; kg_step = 1'b0;
    kg_dir   = !enc_r;
    kg_rnd   = 4'd0;
    case (st)
      S_DPREP:  kg_first = 1'b1;
      S_DERIVE: begin kg_dir = 1'b0; kg_rnd = rnd; kg_step = (phase == 2'd3); end
      S_DSAVE:  kg_save = 1'b1;
      S_PREP:   begin kg_first = enc_r; kg_last = !enc_r; end
      S_ARK0:   begin kg_step = 1'b1; kg_rnd = enc_r ? 4'd1 : 4'(NR); end
      S_ROUND:  begin
        kg_step = (phase == 2'd3) && (rnd != 4'(NR));
        kg_rnd  = enc_r ? rnd + 4'd1 : 4'(NR) - rnd;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; phase <= '0; rnd <= '0; enc_r <= 1'b1;
      din_r <= '0; state_r <= '0; sb_r <= '0; sr_r <= '0; mc_r <= '0;
      data_out <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          din_r <= data_in;
          enc_r <= enc;
          st    <= S_LOAD;
        end
        S_LOAD: st <= (enc_r || last_valid) ? S_PREP : S_DPREP;
        S_DPREP: begin st <= S_DERIVE; phase <= '0; rnd <= 4'd1; end
        S_DERIVE: begin
          phase <= phase + 2'd1;
          if (phase == 2'd3) begin
            rnd <= rnd + 4'd1;
            if (rnd == 4'(NR)) st <= S_DSAVE;
          end
        end
        S_DSAVE: st <= S_DWAIT;
        S_DWAIT: st <= S_PREP;
        S_PREP:  st <= S_ARK0;
        S_ARK0: begin
          state_r <= ark_out;
          st <= S_ROUND; phase <= '0; rnd <= 4'd1;
        end
        S_ROUND: begin
          phase <= phase + 2'd1;
          case (phase)
            2'd0: sb_r <= sb_out;
            2'd1: sr_r <= shift_rows(sb_r, !enc_r);
            2'd2: mc_r <= m1_out;
            2'd3: begin
              state_r <= ark_out;
              if (rnd == 4'(NR)) begin
                st       <= S_IDLE;
                data_out <= ark_out;
                done     <= 1'b1;
              end else rnd <= rnd + 4'd1;
            end
          endcase
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
endmodule
