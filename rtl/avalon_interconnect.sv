// avalon_interconnect: single-master, 32-bit memory-mapped bus fabric.
// The upper SAW bits of the master's word address select one of NS slaves
// (chipselect), the lower LAW bits are passed to all slaves, and the
// selected slave's readdata is returned.  Reads and writes complete in the
// clock they are presented (zero wait states, combinational read path).
// Addresses whose select field has no slave read as zero.
// The published system names a 32-bit bus; the single-master decoder, the
// address split and the absence of wait states are this design's choices.
module avalon_interconnect #(
  parameter int unsigned NS  = 6,
  parameter int unsigned SAW = 3,
  parameter int unsigned LAW = 9
) (
  input  logic                 clk,
  // master side
  input  logic [SAW+LAW-1:0]   m_address,
  input  logic                 m_read,
  input  logic                 m_write,
  input  logic [31:0]          m_writedata,
  output logic [31:0]          m_readdata,
  // slave side
  output logic [NS-1:0]        s_chipselect,
  output logic [LAW-1:0]       s_address,
  output logic                 s_read,
  output logic                 s_write,
  output logic [31:0]          s_writedata,
  input  logic [31:0]          s_readdata [NS]
);
  wire [SAW-1:0] sel = m_address[SAW+LAW-1 -: SAW];

  always_comb begin
    s_chipselect = '0;
    if ((m_read || m_write) && 32'(sel) < NS) s_chipselect[sel] = 1'b1;
  end

  assign s_address   = m_address[LAW-1:0];
  assign s_read      = m_read;
  assign s_write     = m_write;
  assign s_writedata = m_writedata;

  always_comb begin
    m_readdata = '0;
    for (int i = 0; i < int'(NS); i++) if (s_chipselect[i]) m_readdata = s_readdata[i];
  end

  // a master never reads and writes in the same clock
  assert property (@(posedge clk) !(m_read && m_write));
endmodule
