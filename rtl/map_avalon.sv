// map_avalon: 32-bit bus slave around map_core (N-bit operands as 32-bit
// words, word 0 least significant).
//   0-7   a        8-15  b        16-23  modulus p       (write)
//   24-31 result y (read)
//   32    control: bit0 divide, bit1 multiply, bit2 add (one bit at a time;
//         reduction = add with b = 0)
//   33    status: bit0 result ready (cleared by a start), bit1 busy
// readdata is combinational (zero wait states).
// The register map and control bits are this design's own.
module map_avalon #(
  parameter int unsigned N = 163
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        chipselect,
  input  logic        write,
  input  logic        read,
  input  logic [5:0]  address,
  input  logic [31:0] writedata,
  output logic [31:0] readdata,
  output logic        irq
);
  logic [255:0] a, b, p;
  logic [N-1:0] y;
  logic         busy, done, ready;
  wire  wr     = chipselect && write;
  wire  wr_ctl = wr && address == 6'd32;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= '0; b <= '0; p <= '0; ready <= 1'b0;
    end else begin
      if (wr && address[5:3] == 3'd0) a[32*address[2:0] +: 32] <= writedata;
      if (wr && address[5:3] == 3'd1) b[32*address[2:0] +: 32] <= writedata;
      if (wr && address[5:3] == 3'd2) p[32*address[2:0] +: 32] <= writedata;
      if (wr_ctl && writedata[2:0] != 3'b0) ready <= 1'b0;
      if (done) ready <= 1'b1;
    end
  end

  map_core #(.N(N)) u_map (.clk, .rst_n,
    .start_div(wr_ctl && writedata[0]), .start_mul(wr_ctl && writedata[1]),
    .start_add(wr_ctl && writedata[2]),
    .a(a[N-1:0]), .b(b[N-1:0]), .p(p[N-1:0]), .y, .busy, .done);

  always_comb begin
    readdata = '0;
    if (chipselect && read) begin
      if (address[5:3] == 3'd3) readdata = 32'(256'(y) >> (32*address[2:0]));
      else if (address == 6'd33) readdata = {30'b0, busy, ready};
    end
  end
  assign irq = ready;
endmodule
