// aes_avalon: 32-bit bus slave around aes_core.
// Word registers (readdata is combinational, zero wait states):
//   0-3   key, word 0 = bits 127:96          (write)
//   4-7   input block, word 4 = bits 127:96  (write)
//   8     control: bit0 start, bit1 encrypt (1) / decrypt (0), bit2 load key
//         (the key is loaded before the block starts when both are set)
//   9     status: bit0 result ready (cleared by a start), bit1 busy
//   12-15 output block, word 12 = bits 127:96 (read)
// The register map and control bits are this design's own; the published
// system only names the 32-bit bus.
module aes_avalon (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        chipselect,
  input  logic        write,
  input  logic        read,
  input  logic [3:0]  address,
  input  logic [31:0] writedata,
  output logic [31:0] readdata,
  output logic        irq
);
  logic [127:0] key, din, dout;
  logic         key_valid, start, enc, done, busy, ready, load_pending;
  logic [1:0]   go;      // {encrypt, start} waiting for the key load

  wire wr_ctrl = chipselect && write && address == 4'd8;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key <= '0; din <= '0; ready <= 1'b0; load_pending <= 1'b0; go <= '0;
    end else begin
      if (chipselect && write && address < 4'd4) key[127-32*address[1:0] -: 32] <= writedata;
      if (chipselect && write && address >= 4'd4 && address < 4'd8)
        din[127-32*address[1:0] -: 32] <= writedata;
      load_pending <= 1'b0;
      go <= '0;
      if (wr_ctrl) begin
        ready <= ready && !writedata[0];
        // key load first, then the start one clock later
        if (writedata[2]) begin load_pending <= 1'b1; go <= writedata[1:0]; end
      end
      if (done) ready <= 1'b1;
    end
  end

  always_comb begin
    key_valid = wr_ctrl && writedata[2];
    start     = (wr_ctrl && !writedata[2] && writedata[0]) || (load_pending && go[0]);
    enc       = load_pending ? go[1] : writedata[1];
  end

  aes_core u_aes (.clk, .rst_n, .key_valid, .key, .start, .enc, .data_in(din), .data_out(dout),
                  .done, .busy);

  always_comb begin
    readdata = '0;
    if (chipselect && read) begin
      if (address == 4'd9) readdata = {30'b0, busy, ready};
      else if (address >= 4'd12) readdata = dout[127-32*address[1:0] -: 32];
    end
  end
  assign irq = ready;
endmodule
