// sha1_engine: SHA-1 compression function for one padded 512-bit block.
//
// Units: message expansion (sha1_msg_expansion), constant multiplexer (Kt
// chosen by step number t), logical function generator (Ft from B, C, D),
// iteration-step-variable update (registers A..E, one SHA-1 step per clock)
// and feed-forward (chaining variables H0..H4, initialised to the standard
// IV, updated with H += A..E after step 79 and read out as the digest).
// Padding and multi-block sequencing are left to software.
//
// Interface and timing: shift the block in as 16 words, one per clock with
// `load` high.  Then pulse `start`; `first` = 1 restarts from the IV,
// `first` = 0 chains from the previous block's digest.  The 80 steps take
// 80 clocks and the feed-forward one more: md160_rdy rises 81 clocks after
// the start edge and md holds the 160-bit digest.  The digest can also be
// read as five 32-bit words (H0 first): each read_next pulse presents the
// next word on md_word with md_word_rdy high for that cycle.
// One step per clock is this design's choice; no adder tree is pipelined.
module sha1_engine (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [31:0]  mt,
  input  logic         start,
  input  logic         first,
  input  logic         read_next,
  output logic         busy,
  output logic [159:0] md,
  output logic         md160_rdy,
  output logic [31:0]  md_word,
  output logic         md_word_rdy
);
  localparam logic [159:0] IV = 160'h67452301_efcdab89_98badcfe_10325476_c3d2e1f0;

  logic [31:0] a, b, c, d, e, wt, kt, ft;
  logic [31:0] h [5];
  logic [6:0]  t;
  logic        run;
  logic [2:0]  rd_idx;

  sha1_msg_expansion u_mexp (.clk, .rst_n, .load(load && !run), .mt, .step(run), .t, .wt);

  // constant multiplexer
  always_comb begin
    if      (t < 7'd20) kt = 32'h5a827999;
    else if (t < 7'd40) kt = 32'h6ed9eba1;
    else if (t < 7'd60) kt = 32'h8f1bbcdc;
    else                kt = 32'hca62c1d6;
  end

  // logical function generator
  always_comb begin
    if      (t < 7'd20) ft = (b & c) | (~b & d);
    else if (t < 7'd40) ft = b ^ c ^ d;
    else if (t < 7'd60) ft = (b & c) | (b & d) | (c & d);
    else                ft = b ^ c ^ d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {a, b, c, d, e} <= '0;
      for (int i = 0; i < 5; i++) h[i] <= IV[159-32*i -: 32];
      t <= '0; run <= 1'b0; md160_rdy <= 1'b0;
      rd_idx <= '0; md_word <= '0; md_word_rdy <= 1'b0;
    end else begin
      md_word_rdy <= 1'b0;
      if (start && !run) begin
        run <= 1'b1;
        t   <= '0;
        md160_rdy <= 1'b0;
        rd_idx <= '0;
        if (first) begin
          {a, b, c, d, e} <= IV;
          for (int i = 0; i < 5; i++) h[i] <= IV[159-32*i -: 32];
        end else
          {a, b, c, d, e} <= {h[0], h[1], h[2], h[3], h[4]};
      end else if (run) begin
        if (t == 7'd80) begin
          // feed-forward
          h[0] <= h[0] + a; h[1] <= h[1] + b; h[2] <= h[2] + c;
          h[3] <= h[3] + d; h[4] <= h[4] + e;
          run <= 1'b0;
          md160_rdy <= 1'b1;
        end else begin
          a <= {a[26:0], a[31:27]} + ft + e + kt + wt;
          b <= a;
          c <= {b[1:0], b[31:2]};
          d <= c;
          e <= d;
          t <= t + 7'd1;
        end
      end else if (read_next && md160_rdy && rd_idx < 3'd5) begin
        md_word     <= h[rd_idx];
        md_word_rdy <= 1'b1;
        rd_idx      <= rd_idx + 3'd1;
      end
    end
  end

  assign md   = {h[0], h[1], h[2], h[3], h[4]};
  assign busy = run;
endmodule
