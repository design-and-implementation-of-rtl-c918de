// aes_keygen: on-the-fly AES-128 round-key generator ("KeyGen").
//
// Holds the current round key and produces the next one, one round step per
// `step` pulse, in either direction:
//   dir=0 (encryption order)  rk(r)   from rk(r-1), using rcon(rnd=r)
//   dir=1 (decryption order)  rk(r-1) from rk(r),   using rcon(rnd=r)
// Decryption needs the last round key first.  It is derived once per cipher
// key by running the forward schedule ten steps and saving the result
// (`save_last`); later blocks under the same key start from the saved copy
// (`to_last`), which is why only the first decryption block pays for the
// derivation.  The four key S-boxes are shared by both directions.
// All updates happen on the rising clock edge; rk is a register output.
// The KeyGen block and the one-time derivation for decryption follow the
// published core; the step interface is this design's own.
module aes_keygen
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         key_load,    // capture a new cipher key
  input  logic [127:0] key,
  input  logic         to_first,    // rk <= cipher key (round 0)
  input  logic         to_last,     // rk <= saved round-10 key
  input  logic         save_last,   // remember rk as the round-10 key
  input  logic         step,
  input  logic         dir,
  input  logic [3:0]   rnd,
  output logic [127:0] rk,
  output logic         last_valid   // saved round-10 key belongs to the current key
);
  logic [127:0] cipher_key, last_key;
  logic [31:0]  w0, w1, w2, w3, sub_in, sub_out, t;
  logic [127:0] rk_next;

  assign {w0, w1, w2, w3} = rk;

  // RotWord then SubWord on the word that feeds the schedule
  always_comb sub_in = dir ? (w3 ^ w2) : w3;
  for (genvar i = 0; i < 4; i++) begin : g_sb
    aes_sbox u_sb (.din(sub_in[31-8*((i+1)%4) -: 8]), .inv(1'b0), .dout(sub_out[31-8*i -: 8]));
  end

  always_comb begin
    t = sub_out ^ {rcon(rnd), 24'h0};
    if (!dir) begin
      rk_next[127:96] = w0 ^ t;
      rk_next[95:64]  = w1 ^ w0 ^ t;
      rk_next[63:32]  = w2 ^ w1 ^ w0 ^ t;
      rk_next[31:0]   = w3 ^ w2 ^ w1 ^ w0 ^ t;
    end else begin
      rk_next[127:96] = w0 ^ t;
      rk_next[95:64]  = w1 ^ w0;
      rk_next[63:32]  = w2 ^ w1;
      rk_next[31:0]   = w3 ^ w2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cipher_key <= '0;
      last_key   <= '0;
      rk         <= '0;
      last_valid <= 1'b0;
    end else begin
      if (key_load) begin
        cipher_key <= key;
        last_valid <= 1'b0;
      end else if (save_last) begin
        last_key   <= rk;
        last_valid <= 1'b1;
      end
      if (to_first)      rk <= key_load ? key : cipher_key;
      else if (to_last)  rk <= last_key;
      else if (step)     rk <= rk_next;
    end
  end
endmodule
